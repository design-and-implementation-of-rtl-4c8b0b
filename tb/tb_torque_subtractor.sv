// tb_torque_subtractor: all 2^20 operand pairs of the 10-bit subtractor,
// expecting Tmax - Toffset, or 0 when Toffset exceeds Tmax.
module tb_torque_subtractor;

  logic [9:0] tmax, toffset, amplitude;
  int         checks = 0, failures = 0;

  torque_subtractor dut (.tmax(tmax), .toffset(toffset), .amplitude(amplitude));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int m = 0; m < 1024; m++) begin
      for (int o = 0; o < 1024; o++) begin
        tmax = 10'(m); toffset = 10'(o);
        #1;
        exp = (m >= o) ? m - o : 0;
        checks++;
        if (int'(amplitude) != exp) begin
          failures++;
          if (failures < 10) $display("ERROR %0d-%0d gave %0d exp %0d", m, o, amplitude, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
