// tb_apuf_stage: checks the lane steering and the per-wire delays of one
// arbiter PUF switch stage. Four distinct delays are given; for each value
// of the challenge bit the arrival time of each output edge is measured and
// compared with the delay of the wire that should carry it. Single-lane
// edges check that straight/crossed routing really moves the edge.
module tb_apuf_stage;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DTS = 11, DBC = 23, DTC = 37, DBS = 53;

  logic top_i, bot_i, c_i, top_o, bot_o;
  int checks = 0, failures = 0;

  apuf_stage #(.D_TOP_STRAIGHT(DTS), .D_BOT_CROSS(DBC), .D_TOP_CROSS(DTC),
               .D_BOT_STRAIGHT(DBS)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Fire rising edges on the selected lanes and measure output arrival times.
  longint t_top, t_bot;  // arrival times of the last fire()

  task automatic fire(logic c, logic on_top, logic on_bot);
    longint t0;
    top_i = 0; bot_i = 0; c_i = c;
    #1000;
    t_top = -1; t_bot = -1;
    t0 = longint'($time);
    top_i = on_top; bot_i = on_bot;
    fork
      begin @(posedge top_o); t_top = longint'($time) - t0; end
      begin @(posedge bot_o); t_bot = longint'($time) - t0; end
      #500;
    join_any
    #500;
    disable fork;
  endtask

  initial begin
    fire(1'b1, 1'b1, 1'b1);
    check("c=1 top lane delay", t_top, DTS);
    check("c=1 bottom lane delay", t_bot, DBS);
    fire(1'b0, 1'b1, 1'b1);
    check("c=0 top output delay", t_top, DBC);
    check("c=0 bottom output delay", t_bot, DTC);
    fire(1'b0, 1'b1, 1'b0);
    check("c=0 top edge crosses to bottom", t_bot, DTC);
    check("c=0 top output stays low", longint'(top_o), 0);
    fire(1'b1, 1'b1, 1'b0);
    check("c=1 top edge stays on top", t_top, DTS);
    check("c=1 bottom output stays low", longint'(bot_o), 0);
    fire(1'b0, 1'b0, 1'b1);
    check("c=0 bottom edge crosses to top", t_top, DBC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
