// dfs_clock_gen: dynamic frequency scaling of the compute clock, as a clock
// enable derived from the base clock.
//
// What it does: the processor's frequency is scaled to match memory
// bandwidth.  Instead of an analog clock synthesiser, this design keeps a
// single base clock (the DRAM channel clock, 1200 MHz) and produces a
// clock-enable ce whose average rate is freq_mhz / BASE_MHZ: the corelets
// advance only in cycles with ce high, so they compute at freq_mhz on average.
// This keeps the corelets and the memory side in one clock domain; a silicon
// implementation would gate the clock with ce or use a real frequency
// synthesiser.  The clock-enable realisation is this design's own choice.
//
// How it works: a phase accumulator adds freq_mhz every cycle and, when the
// sum reaches BASE_MHZ, subtracts BASE_MHZ and raises ce for the next cycle.
// The enable pattern is therefore spread evenly (at 700 of 1200 MHz, 7 of
// every 12 cycles carry ce).  freq_mhz must not exceed BASE_MHZ.
//
// Timing: ce is registered; a new freq_mhz takes effect from the next cycle.
module dfs_clock_gen
  import rowcore_pkg::*;
#(
  parameter int unsigned BASE_MHZ = BASE_MHZ_DEF,
  parameter int unsigned FW       = $clog2(NOMINAL_MHZ_DEF + 1),
  localparam int unsigned AW      = $clog2(2 * BASE_MHZ + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [FW-1:0] freq_mhz,
  output logic          ce
);

  logic [AW-1:0] acc, sum;

  assign sum = acc + AW'(freq_mhz);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ce  <= 1'b0;
    end else if (32'(sum) >= BASE_MHZ) begin
      acc <= sum - AW'(BASE_MHZ);
      ce  <= 1'b1;
    end else begin
      acc <= sum;
      ce  <= 1'b0;
    end
  end

endmodule
