// tb_debounce: checks the debouncer against a cycle-by-cycle reference.
//
// With COUNT_MAX = 20 the bench drives bounces (high runs shorter than the
// threshold), runs exactly at and just past the threshold, long holds and
// random noise. The reference counts consecutive high samples in the bench
// and expects output high after more than COUNT_MAX of them, low as soon as
// a low sample arrives. The number of cycles from a clean press to a high
// output is checked as well (COUNT_MAX+1).
module tb_debounce;
  localparam int unsigned COUNT_MAX = 20;

  logic clk = 1'b0, rst = 1'b1, input_i = 1'b0, output_o;
  int   checks = 0, failures = 0;
  int   run = 0;          // reference: consecutive high samples
  bit   exp_out = 1'b0;
  int   rises = 0;

  debounce #(.COUNT_MAX(COUNT_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated on the same edges as the block
  always @(posedge clk) begin
    if (rst) begin
      run = 0;
      exp_out = 1'b0;
    end else begin
      run = input_i ? run + 1 : 0;
      exp_out = (run > COUNT_MAX);
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (output_o !== exp_out) begin
      failures++;
      $display("FAIL output %b expected %b (run %0d) at %0t", output_o, exp_out, run, $time);
    end
  end

  task automatic drive(input bit v, input int n);
    input_i = v;
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // bounces shorter than the threshold never pass
    for (int i = 1; i < 20; i++) begin
      drive(1'b1, i);
      drive(1'b0, 1 + i % 3);
    end
    // exactly COUNT_MAX high samples: not enough
    drive(1'b1, COUNT_MAX);
    checks++;
    if (output_o) begin failures++; $display("FAIL output after %0d samples", COUNT_MAX); end
    drive(1'b0, 2);
    // clean press: count cycles to the output
    input_i = 1'b1;
    t0 = 0;
    while (!output_o) begin
      @(posedge clk);
      #1;
      t0++;
    end
    checks++;
    if (t0 != COUNT_MAX + 1) begin
      failures++;
      $display("FAIL press latency %0d, expected %0d", t0, COUNT_MAX + 1);
    end
    rises++;
    drive(1'b1, 200);          // long hold stays high
    drive(1'b0, 1);            // one low sample drops it
    checks++;
    if (output_o) begin failures++; $display("FAIL output did not drop"); end
    // random noise, biased towards long highs
    for (int i = 0; i < 300; i++) drive(1'($urandom_range(0, 9) != 0), $urandom_range(1, 8));
    drive(1'b0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
