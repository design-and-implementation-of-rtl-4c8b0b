// tb_processor_interface: drives host write cycles and checks the decoded
// settings and spare ports. Covers writes to each of 100H..107H with random
// data, writes outside the window, writes with IODIS high or MION high
// (all of which must change nothing) and power-on reset.
module tb_processor_interface;

  logic        clk = 0, por = 1;
  logic [9:0]  ia = '0;
  logic [15:0] id = '0;
  logic        mion = 1, iodis = 0, wrn = 1;
  logic [11:0] step_rate;
  logic        direction, enable;
  logic [7:0]  msr;
  logic [9:0]  tmax, toffset;
  logic [15:0] misc_port [4];
  logic [15:0] model [8];
  int          checks = 0, failures = 0;

  processor_interface dut (
    .clk(clk), .por(por), .ia(ia), .id(id), .mion(mion), .iodis(iodis), .wrn(wrn),
    .step_rate(step_rate), .direction(direction), .enable(enable), .msr(msr),
    .tmax(tmax), .toffset(toffset), .misc_port(misc_port));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One write cycle: address and data set up, WRN low for one clock edge.
  task automatic bus_write(input logic [9:0] a, input logic [15:0] d,
                           input logic m, input logic dis);
    @(negedge clk);
    ia = a; id = d; mion = m; iodis = dis; wrn = 0;
    @(negedge clk);
    wrn = 1; mion = 1; iodis = 0;
  endtask

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("ERROR %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic check_all();
    expect_eq("step_rate", int'(step_rate), int'(model[0][11:0]));
    expect_eq("direction", int'(direction), int'(model[0][12]));
    expect_eq("enable",    int'(enable),    int'(model[0][13]));
    expect_eq("msr",       int'(msr),       int'(model[1][7:0]));
    expect_eq("tmax",      int'(tmax),      int'(model[2][9:0]));
    expect_eq("toffset",   int'(toffset),   int'(model[3][9:0]));
    for (int i = 0; i < 4; i++) expect_eq("misc", int'(misc_port[i]), int'(model[4+i]));
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    check_all();
    #1 por = 0;
    for (int n = 0; n < 400; n++) begin
      logic [9:0]  a;
      logic [15:0] d;
      logic        m, dis;
      int          kind;
      kind = int'($urandom_range(9));
      d = 16'($urandom);
      m = 0; dis = 0;
      if (kind < 6) a = 10'h100 + 10'($urandom_range(7));    // valid write
      else if (kind == 6) begin a = 10'($urandom); if (a[9:3] == 7'h20) a[9] = 1'b1; end
      else if (kind == 7) begin a = 10'h100 + 10'($urandom_range(7)); dis = 1; end
      else if (kind == 8) begin a = 10'h100 + 10'($urandom_range(7)); m = 1; end
      else a = 10'h108 + 10'($urandom_range(7));               // just above the window
      bus_write(a, d, m, dis);
      if (kind < 6) model[a[2:0]] = d;
      check_all();
    end
    // power-on reset clears everything
    #2 por = 1; #1;
    foreach (model[i]) model[i] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
