// io_buffer: I/O buffer between the local memory banks and the PE array.
//
// N_OUT multiplexers, each selecting one of N_IN 32-bit words, followed by
// N_OUT 32-bit registers.  In the input buffer the words are the first
// local memory banks and the outputs feed the operands of PE row 0; in the
// output buffer the words are OUT1/OUT2 of the last PE row and the outputs
// go to the second local memory banks.  The select of every multiplexer
// comes from the active context.
//
// Timing: one register stage, loaded on every enabled clock ('ce' and
// 'en').  Following the document: the multiplexer-plus-register structure
// (16 or 32 multiplexers of 16 or 32 inputs).  The select encoding is this
// design's own.
module io_buffer #(
  parameter int unsigned N_IN  = 32,
  parameter int unsigned N_OUT = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned SW   = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic                   en,
  input  logic [N_IN-1:0][W-1:0] din,
  input  logic [N_OUT-1:0][SW-1:0] sel,
  output logic [N_OUT-1:0][W-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
    end else if (ce && en) begin
      for (int k = 0; k < int'(N_OUT); k++) begin
        dout[k] <= (32'(sel[k]) < N_IN) ? din[sel[k]] : '0;
      end
    end
  end

endmodule
