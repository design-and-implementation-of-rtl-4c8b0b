// tb_data_latch: checks reset to 0, load on a clock edge while CS is high,
// hold while CS is low, and asynchronous clear by POR between edges.
module tb_data_latch;

  logic        clk = 0, por = 1, cs = 0;
  logic [15:0] d = '0, q, model;
  int          checks = 0, failures = 0;

  data_latch dut (.clk(clk), .por(por), .cs(cs), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("ERROR %s q=%h exp=%h", what, q, model);
    end
  endtask

  initial begin
    model = '0;
    #12 check("reset");
    por = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      cs = 1'($urandom);
      d  = 16'($urandom);
      @(posedge clk); #1;
      if (cs) model = d;
      check("write/hold");
    end
    // asynchronous clear in the middle of a clock period
    @(negedge clk); cs = 0; #2 por = 1; #1;
    model = '0;
    check("async por");
    #1 por = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
