// tb_address_decoder: exhaustive check of the chip-select decoder over all
// 1024 addresses and all combinations of MION, IODIS and WRN. Only a write
// I/O cycle (all three low) to 100H..107H may raise exactly CS[address-100H].
module tb_address_decoder;

  logic [9:0] ia;
  logic       mion, iodis, wrn;
  logic [7:0] cs;
  int         checks = 0, failures = 0;

  address_decoder dut (.ia(ia), .mion(mion), .iodis(iodis), .wrn(wrn), .cs(cs));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int a = 0; a < 1024; a++) begin
      for (int c = 0; c < 8; c++) begin
        ia = 10'(a); {mion, iodis, wrn} = 3'(c);
        #1;
        exp = 8'h00;
        if (c == 0 && a >= 'h100 && a <= 'h107) exp = 8'h01 << (a - 'h100);
        checks++;
        if (cs !== exp) begin
          failures++;
          if (failures < 10) $display("ERROR ia=%h ctl=%b cs=%b exp=%b", ia, c[2:0], cs, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
