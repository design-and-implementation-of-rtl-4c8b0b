// tb_shift_add_multiplier: compares the shift-and-add product with
// round(a * f / 4096) computed with the ordinary multiply operator, for the
// corner cases and 200000 random operand pairs.
module tb_shift_add_multiplier;
  import microstep_ref_pkg::*;

  logic [9:0]  a, y;
  logic [11:0] f;
  int          checks = 0, failures = 0;

  shift_add_multiplier dut (.a(a), .f(f), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int av, input int fv);
    a = 10'(av); f = 12'(fv);
    #1;
    checks++;
    if (int'(y) != ref_mul(av, fv)) begin
      failures++;
      if (failures < 10) $display("ERROR %0d*%0d gave %0d exp %0d", av, fv, y, ref_mul(av, fv));
    end
  endtask

  initial begin
    try(0, 0); try(1023, 4095); try(1023, 0); try(0, 4095); try(1, 2048);
    try(1023, 2896); try(512, 4095); try(1, 4095);
    for (int i = 0; i < 200000; i++) try(int'($urandom_range(1023)), int'($urandom_range(4095)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
