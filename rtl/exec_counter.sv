// exec_counter: execution-time counter of one CGRA node.
//
// Counts system (RISC) clock cycles while 'active' is high: from the first
// packet of a job (data into the local memory, configuration, run,
// transfer back) up to the acknowledgment.  'count' is the running value,
// cleared when a job starts; at the end of a job it is copied to
// 'last_count' and 'done' pulses for one enabled clock.
//
// Timing: counts on 'ce' (system clock enable).  The document describes
// this as a special counter of the RISC processor that counts the clock
// cycles of a block's complete execution (memory to memory transfers and
// CGRA execution); making it a hardware block next to the DMA is this
// design's choice.
module exec_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        active,
  output logic [31:0] count,
  output logic [31:0] last_count,
  output logic        done
);

  logic active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q   <= 1'b0;
      count      <= '0;
      last_count <= '0;
      done       <= 1'b0;
    end else if (ce) begin
      active_q <= active;
      done     <= 1'b0;
      if (active && !active_q) begin
        count <= 32'd1;
      end else if (active) begin
        count <= (count == '1) ? count : count + 1;
      end else if (active_q) begin
        last_count <= count;
        done       <= 1'b1;
      end
    end
  end

endmodule
