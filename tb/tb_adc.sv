// tb_adc: end-to-end test of the ramp converter at its default parameters.
//
// The converter runs with a 50 MHz clock, a 1 kHz ramp step and a 1,000,000
// cycle start-button filter, exactly as built. Its da_out drives a model of
// the resistor-net DAC (0 to 3.3 V) and a model comparator closes the loop
// against the bench's input voltage v_in.
//
// Sequence and checks:
//  * a 1000-cycle bounce on start_in must not start a conversion;
//  * start_in is then held: the first conversion begins at a tick after the
//    filter passes, and the bench keeps the button down so conversions run
//    back to back, changing v_in each time done rises;
//  * for every conversion the result must be the first code whose DAC
//    voltage reaches v_in (all ones for an over-range input), done must be
//    low for exactly (result+1) step periods, the code must start from 0
//    after the clear, and da_out must equal result_out;
//  * between back-to-back conversions done is high for exactly one period;
//  * after release no further conversion may start.
// Each mechanism (bounce rejected, clear, comparator stop, terminal-count
// stop, back-to-back restart) is counted and must occur at least once.
module tb_adc;
  localparam int  WIDTH  = 4;
  localparam int  N      = 50_000_000 / 1000;   // clk cycles per ramp step
  localparam int  DEB    = 1_000_000;
  localparam real VREF   = 3.3;
  localparam int  NV     = 14;

  logic clk = 1'b0, rst = 1'b1, start_in = 1'b0, comp;
  logic [WIDTH-1:0] da_out, result_out;
  logic done;
  real  v_in = 0.0, v_dac;

  int checks = 0, failures = 0, cycle = 0;
  int n_bounce = 0, n_clear = 0, n_comp_stop = 0, n_tc_stop = 0, n_b2b = 0;
  real volts[NV] = '{0.0, 0.1, 0.5, 1.0, 1.65, 2.0, 2.5, 3.0, 3.25, 3.3, 3.6,
                     0.0, 0.0, 0.0};
  int vi = 0;
  bit running = 1'b0;

  adc dut (.*);
  resistor_dac_model #(.WIDTH(WIDTH), .VREF(VREF)) dac (.code(da_out), .v_out(v_dac));
  comparator_model cmp (.v_sample(v_in), .v_dac(v_dac), .out(comp));

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
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

  function automatic int expected_code(input real v);
    for (int k = 0; k < (1 << WIDTH); k++)
      if (VREF * real'(k) / real'((1 << WIDTH) - 1) >= v) return k;
    return (1 << WIDTH) - 1;
  endfunction

  function automatic bit overrange(input real v);
    return VREF < v;
  endfunction

  // da_out and result_out are the same counter value
  always @(negedge clk) if (!rst) begin
    checks++;
    if (da_out !== result_out) begin
      failures++;
      $display("FAIL da_out %0d result_out %0d", da_out, result_out);
    end
  end

  // conversion monitor: runs while the button is held
  initial begin
    int t_fall, t_rise, k;
    t_rise = -1;
    forever begin
      @(negedge done);
      t_fall = cycle;
      running = 1'b1;
      if (t_rise >= 0) begin
        n_b2b++;
        check(t_fall - t_rise == N, $sformatf("done high %0d cycles between conversions, expected %0d",
                                             t_fall - t_rise, N));
      end
      @(negedge clk);
      check(da_out == '0, $sformatf("code %0d after clear", da_out));
      if (da_out == '0) n_clear++;
      @(posedge done);
      t_rise = cycle;
      running = 1'b0;
      #1;
      k = expected_code(volts[vi]);
      check(result_out == WIDTH'(k), $sformatf("v_in %f: result %0d expected %0d",
                                                volts[vi], result_out, k));
      check(t_rise - t_fall == (k + 1) * N, $sformatf("v_in %f: busy %0d cycles expected %0d",
                                                       volts[vi], t_rise - t_fall, (k + 1) * N));
      if (overrange(volts[vi])) n_tc_stop++;
      else n_comp_stop++;
      $display("v_in %4.2f V -> code %0d (%0d cycles)", volts[vi], result_out, t_rise - t_fall);
      vi++;
      if (vi < NV) v_in = volts[vi];
    end
  end

  initial begin
    int lows;
    // two random voltages in 0..3.4 V at the end of the list
    volts[NV-3] = real'($urandom_range(0, 3400)) / 1000.0;
    volts[NV-2] = real'($urandom_range(0, 3400)) / 1000.0;
    volts[NV-1] = 1.2;
    v_in = volts[0];
    repeat (5) @(posedge clk);
    rst = 1'b0;
    check(done == 1'b1, "done after reset");
    // bounce: short press must be rejected
    start_in = 1'b1;
    repeat (1000) @(posedge clk);
    start_in = 1'b0;
    lows = 0;
    repeat (3 * N) @(posedge clk) if (!done) lows++;
    check(lows == 0, "bounce started a conversion");
    if (lows == 0) n_bounce++;
    // hold the button through all conversions
    start_in = 1'b1;
    wait (vi == NV - 1);
    @(negedge done);           // last conversion has started
    start_in = 1'b0;
    wait (vi == NV);
    lows = 0;
    repeat (3 * N) @(posedge clk) if (!done) lows++;
    check(lows == 0, "conversion after release");
    check(n_bounce > 0, "no bounce rejected");
    check(n_clear > 0, "no clear seen");
    check(n_comp_stop > 0, "no comparator stop");
    check(n_tc_stop > 0, "no terminal-count stop");
    check(n_b2b > 0, "no back-to-back conversion");
    $display("bounce=%0d clear=%0d comp_stop=%0d tc_stop=%0d back_to_back=%0d",
             n_bounce, n_clear, n_comp_stop, n_tc_stop, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
