// tb_rate_matcher: self-checking test of the hill-climbing frequency control.
//
// Drives runs of "buffers empty" events (memory-bound), then "buffers full"
// events (compute-bound), and compares every step with an independent model
// (step = 5 % of the current frequency, at least 1 MHz, kept within
// 175 .. 700 MHz).  Also checks that simultaneous events change nothing,
// that disabling rate matching returns to nominal, that start resets to
// nominal, and that a frequency change takes effect one cycle after its event.
module tb_rate_matcher;
  logic clk = 0, rst_n = 0, start = 0, enable = 1, ev_empty = 0, ev_full = 0;
  logic [9:0] freq_mhz;
  logic step_down, step_up;
  int checks = 0, failures = 0;
  int model = 700;
  int n_down = 0, n_up = 0;

  rate_matcher dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (step_down) n_down++;
    if (step_up) n_up++;
  end

  task automatic expect_f(string what, int exp);
    checks++;
    if (int'(freq_mhz) != exp) begin
      failures++;
      $display("FAIL %s: freq %0d expected %0d", what, freq_mhz, exp);
    end
  endtask

  task automatic pulse(bit e, bit f);
    @(negedge clk); ev_empty = e; ev_full = f;
    @(negedge clk); ev_empty = 0; ev_full = 0;
  endtask

  function automatic int step_of(int f);
    int s;
    s = f * 5 / 100;
    return (s == 0) ? 1 : s;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_f("reset", 700);
    // memory-bound: step down until the floor
    for (int k = 0; k < 40; k++) begin
      pulse(1, 0);
      model = (model - step_of(model) < 175) ? 175 : model - step_of(model);
      expect_f($sformatf("down %0d", k), model);
    end
    expect_f("floor", 175);
    // simultaneous events: no change
    pulse(1, 1);
    expect_f("both", model);
    // compute-bound: step up until nominal
    for (int k = 0; k < 40; k++) begin
      pulse(0, 1);
      model = (model + step_of(model) > 700) ? 700 : model + step_of(model);
      expect_f($sformatf("up %0d", k), model);
    end
    expect_f("ceiling", 700);
    // latency: the change is visible one cycle after the event
    @(negedge clk) ev_empty = 1;
    @(posedge clk) #1 expect_f("one-cycle latency", 665);
    @(negedge clk) ev_empty = 0;
    // disable: back to nominal and events ignored
    pulse(1, 0);
    @(negedge clk) enable = 0;
    @(negedge clk);
    expect_f("disabled", 700);
    pulse(1, 0);
    expect_f("disabled ignores events", 700);
    enable = 1;
    pulse(1, 0); pulse(1, 0);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    expect_f("start", 700);
    checks++;
    if (n_down == 0 || n_up == 0) begin failures++; $display("FAIL: step counters"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
