// clk_en_gen: tunable clock generator, realised as a clock-enable
// generator on the base clock.
//
// A phase accumulator adds the requested frequency (MHz) every base clock;
// whenever the sum reaches the base frequency BASE_MHZ, it subtracts it and
// raises 'ce' for that clock.  Over any window the number of enables is
// freq_mhz/BASE_MHZ of the base clocks (within one), so logic enabled by
// 'ce' advances exactly as if clocked at freq_mhz.  With 'gate' set no
// enable is produced and the accumulator holds (clock gating by the PMU).
// A request above BASE_MHZ saturates at one enable per clock.
//
// Timing: 'ce' is a registered output; a new frequency takes effect on the
// next clock.  The document gives the function (16 frequencies between
// 35.0 and 200.0 MHz from a tunable clock generator per RISC node); an
// enable generator instead of a PLL, and the base clock of 200 MHz, are
// this design's choice, which keeps the whole platform on one clock.
module clk_en_gen #(
  parameter int unsigned BASE_MHZ = 200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] freq_mhz,
  input  logic       gate,
  output logic       ce
);

  logic [8:0] acc;
  logic [9:0] sum;

  assign sum = 10'(acc) + 10'(freq_mhz);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ce  <= 1'b0;
    end else if (gate) begin
      ce  <= 1'b0;
    end else if (32'(sum) >= BASE_MHZ) begin
      acc <= 9'(32'(sum) - BASE_MHZ);
      ce  <= 1'b1;
    end else begin
      acc <= 9'(sum);
      ce  <= 1'b0;
    end
  end

endmodule
