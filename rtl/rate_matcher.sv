// rate_matcher: coarse-grain compute-memory rate matching by hill climbing.
//
// What it does: chooses the processor's compute clock frequency so that the
// corelets consume rows about as fast as the DRAM delivers them, saving the
// energy they would otherwise spend idling in memory-bound kernels.  It uses
// the prefetch buffer's flow control as its sensor: when a leading corelet
// finds the buffers empty the kernel is memory-bound and the clock is lowered
// by one step; when a leading corelet finds them full the kernel is
// compute-bound and the clock is raised by one step.  After convergence the
// frequency dithers within one step of the matching rate.  One frequency
// serves all corelets of the processor.
//
// How it works: freq_mhz is a register in MHz.  A step is STEP_PCT percent of
// the current frequency (at least 1 MHz), so down and up steps are relative,
// as in "lower by 5 %".  The frequency is kept between MIN_MHZ and the
// nominal frequency.  Step size 5 % and nominal 700 MHz follow the
// processor's description; the minimum (a quarter of nominal, the largest
// change the description uses as an example), relative rather than absolute
// steps, and the enable input that turns rate matching off (frequency held at
// nominal) are this design's own choices.
//
// Timing: an event moves the frequency at the next clock edge.  If both
// events occur in the same cycle nothing changes.  start returns the
// frequency to nominal.
module rate_matcher
  import rowcore_pkg::*;
#(
  parameter int unsigned NOMINAL_MHZ = NOMINAL_MHZ_DEF,
  parameter int unsigned MIN_MHZ     = NOMINAL_MHZ_DEF / 4,
  parameter int unsigned STEP_PCT    = 5,
  localparam int unsigned FW         = $clog2(NOMINAL_MHZ + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          enable,     // 0: rate matching off, run at nominal
  input  logic          ev_empty,   // buffers found empty: memory-bound
  input  logic          ev_full,    // buffers found full: compute-bound
  output logic [FW-1:0] freq_mhz,
  output logic          step_down,  // a down step was taken this cycle
  output logic          step_up     // an up step was taken this cycle
);

  logic [FW-1:0] step, dn, up;

  always_comb begin
    step = FW'((32'(freq_mhz) * STEP_PCT) / 100);
    if (step == '0) step = FW'(1);
    dn = (32'(freq_mhz) >= MIN_MHZ + 32'(step)) ? freq_mhz - step : FW'(MIN_MHZ);
    up = (32'(freq_mhz) + 32'(step) <= NOMINAL_MHZ) ? freq_mhz + step : FW'(NOMINAL_MHZ);
  end

  assign step_down = enable && ev_empty && !ev_full && (32'(freq_mhz) > MIN_MHZ);
  assign step_up   = enable && ev_full && !ev_empty && (32'(freq_mhz) < NOMINAL_MHZ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          freq_mhz <= FW'(NOMINAL_MHZ);
    else if (start)      freq_mhz <= FW'(NOMINAL_MHZ);
    else if (!enable)    freq_mhz <= FW'(NOMINAL_MHZ);
    else if (step_down)  freq_mhz <= dn;
    else if (step_up)    freq_mhz <= up;
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (32'(freq_mhz) >= MIN_MHZ && 32'(freq_mhz) <= NOMINAL_MHZ)
      else $error("rate_matcher: frequency out of range");
  end

endmodule
