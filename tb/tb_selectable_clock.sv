// tb_selectable_clock: checks the four divide ratios of selectable_clock.
//
// With a 10 kHz clock parameter the four periods are 100000, 10000, 1000 and
// 10 cycles. For each {s1,s0} setting the bench lets one period pass after
// the switch, then measures several periods: cycles between ticks must equal
// the period N, out_clk must be high for N/2+1 cycles of each period, and
// every tick must coincide with a rising edge of out_clk. A switch from the
// slowest rate, with the shared count far past the new period, must wrap the
// count at once.
module tb_selectable_clock;
  localparam int unsigned CLK_HZ = 10_000;

  logic clk = 1'b0, rst = 1'b1, s0 = 1'b1, s1 = 1'b1;
  logic out_clk, tick;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  selectable_clock #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  task automatic measure(input logic [1:0] sel, input int n, input int periods);
    int  t_last, highs;
    logic prev;
    {s1, s0} = sel;
    // settle: skip to the second tick after the switch
    repeat (2) begin
      do begin
        @(posedge clk);
        #1;
      end while (!tick);
    end
    t_last = cycle;
    highs  = 0;
    prev   = out_clk;
    for (int p = 0; p < periods; p++) begin
      highs = 0;
      do begin
        @(posedge clk);
        #1;
        if (out_clk) highs++;
        if (tick) check(out_clk && !prev, "tick without rising out_clk");
        else if (out_clk && !prev) check(1'b0, "rising out_clk without tick");
        prev = out_clk;
      end while (!tick);
      check(cycle - t_last == n, $sformatf("sel %b period %0d != %0d", sel, cycle - t_last, n));
      // highs counted the tick cycle of this period, not the previous one:
      // out_clk is high for N/2+1 cycles per period either way
      check(highs == n / 2 + 1, $sformatf("sel %b high time %0d != %0d", sel, highs, n / 2 + 1));
      t_last = cycle;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    measure(2'b11, CLK_HZ / 1000, 20);
    measure(2'b10, CLK_HZ / 10, 5);
    measure(2'b01, CLK_HZ, 3);
    measure(2'b00, CLK_HZ * 10, 1);
    // switching to a short period with the shared count far beyond it:
    // the count must wrap at once, so a tick follows within one new period
    repeat (30_000) @(posedge clk);
    #1 {s1, s0} = 2'b11;
    begin
      int waited = 0;
      do begin
        @(posedge clk);
        #1;
        waited++;
      end while (!tick && waited < 100);
      check(waited <= CLK_HZ / 1000 + 1, $sformatf("first tick %0d cycles after switch", waited));
    end
    measure(2'b11, CLK_HZ / 1000, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
