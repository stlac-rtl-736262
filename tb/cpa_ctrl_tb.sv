// cpa_ctrl_tb: drives hit/access profiles through several partition periods
// and checks every decision (shrink, expand, keep, floor) against a
// reference computed here from the same counts, and that decisions come
// exactly at the end of each period.
module cpa_ctrl_tb;
  import stlac_pkg::*;
  localparam int WAYS = 8, PERIOD = 200, THR = 10;

  // rst_n falls just after time 0 so that the asynchronous reset acts before
  // the first clock edge
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic ev_access, ev_hit_v, ev_hit_p, mv_valid, mv_done, ev_shrink_v, ev_expand_v;
  part_t mv_src;
  logic [3:0] cap_v, cap_p;
  int checks = 0, failures = 0;

  cpa_ctrl #(.WAYS(WAYS), .PERIOD(PERIOD), .THR_PCT(THR)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one period: acc accesses, hv victim hits, hp prefetch hits (hits <= acc)
  int exp_cv = WAYS / 2;
  task automatic period(input int acc, input int hv, input int hp);
    int dec, moves;
    moves = 0;
    for (int c = 0; c < PERIOD; c++) begin
      ev_access <= (c < acc);
      ev_hit_v  <= (c < hv);
      ev_hit_p  <= (c >= hv && c < hv + hp);
      @(posedge clk);
      #1;
      if (c < PERIOD - 1 && mv_valid) moves++;
    end
    ev_access <= 0; ev_hit_v <= 0; ev_hit_p <= 0;
    // reference decision
    dec = 0;
    if (acc > 0 && (hp - hv) * 100 >= THR * acc && exp_cv > 1) dec = 1;
    else if (acc > 0 && (hv - hp) * 100 >= THR * acc && WAYS - exp_cv > 1) dec = -1;
    // the decision is registered on the last edge of the period
    check(moves == 0, "move issued inside the period");
    check(mv_valid == (dec != 0), $sformatf("decision acc=%0d hv=%0d hp=%0d", acc, hv, hp));
    if (dec != 0) check(mv_src == (dec > 0 ? PART_VICTIM : PART_PREF), "move direction");
    exp_cv -= dec;
    check(cap_v == 4'(exp_cv) && cap_p == 4'(WAYS - exp_cv),
          $sformatf("capacities %0d/%0d expected %0d", cap_v, cap_p, exp_cv));
    check(ev_shrink_v == (dec > 0) && ev_expand_v == (dec < 0), "event pulses");
    // the cache answers the move 20 cycles later
    if (dec != 0) begin
      repeat (19) @(posedge clk);
      mv_done <= 1; @(posedge clk); mv_done <= 0;
      repeat (PERIOD - 20) @(posedge clk);
    end else repeat (PERIOD) @(posedge clk);
  endtask

  // After a period ends the controller counts the next period at once, so
  // each call above covers two periods: a profiled one and an idle one.
  initial begin
    ev_access = 0; ev_hit_v = 0; ev_hit_p = 0; mv_done = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // the first period starts on the first edge after reset release
    check(cap_v == 4 && cap_p == 4, "equal split at start");
    period(100, 10, 30);   // prefetch part much better: shrink victim
    period(0, 0, 0);       // no accesses: keep
    period(100, 20, 25);   // 5% difference: keep
    period(100, 20, 30);   // exactly 10%: shrink
    period(100, 60, 10);   // victim better: expand
    for (int i = 0; i < 5; i++) period(150, 0, 100);   // drive down to the floor
    for (int i = 0; i < 8; i++) period(150, 100, 0);   // and up to the other floor
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
