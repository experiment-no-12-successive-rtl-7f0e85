// tb_counter: checks the ramp counter and its built-in slow clock.
//
// With CLK_HZ = 10,000 and the 1 kHz selection the counter steps every 10
// clk cycles. The bench applies random enable and clear values, held
// constant between ticks, and compares o, tc and done with a reference that
// clears on reset and adds one on enable at each tick, wrapping at 16. It
// also checks that ticks are 10 cycles apart and that o only changes right
// after a tick.
module tb_counter;
  localparam int unsigned CLK_HZ = 10_000;
  localparam int unsigned WIDTH  = 4;
  localparam int          PERIOD = CLK_HZ / 1000;

  logic clk = 1'b0, rst = 1'b1, en_in = 1'b0, reset = 1'b0;
  logic [WIDTH-1:0] o;
  logic tc, done, clk_out, tick;
  logic [WIDTH-1:0] ref_o = '0, prev_o;
  int   checks = 0, failures = 0, cycle = 0, last_tick = -1, wraps = 0, ticks = 0;

  counter #(.CLK_HZ(CLK_HZ), .WIDTH(WIDTH), .CLK_SEL(2'b11)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
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

  // reference and checks, sampled in the middle of each cycle
  always @(negedge clk) if (!rst) begin
    cycle++;
    check(o == ref_o, $sformatf("o %0d expected %0d", o, ref_o));
    check(tc == (ref_o == '1), "tc");
    check(done == !en_in, "done");
    if (tick) begin
      ticks++;
      if (last_tick >= 0) check(cycle - last_tick == PERIOD, "tick spacing");
      last_tick = cycle;
      if (reset) ref_o = '0;
      else if (en_in) begin
        if (ref_o == '1) wraps++;
        ref_o = ref_o + 1'b1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // count all the way round twice, then random control
    en_in = 1'b1;
    repeat (40 * PERIOD) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      en_in = ($urandom_range(0, 3) != 0);
      reset = ($urandom_range(0, 9) == 0);
      repeat (PERIOD) @(posedge clk);
    end
    check(wraps >= 2, "counter never wrapped");
    check(ticks >= 300, "too few ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
