// dp_ram: dual-port RAM used for the CGRA local memory banks and the RISC
// data memories.
//
// Two independent synchronous ports on one clock, each with its own clock
// enable, so that one side can run on the system clock enable and the other
// on the tunable CGRA clock enable.  Each port writes 'wdata' at 'addr' when
// 'we' is set and returns the word at 'addr' one enabled clock later
// (read-before-write on the same port).  When both ports write the same word
// in the same clock, port B wins.
//
// The document names the local memory banks and data memories but gives no
// size or port structure: the depth default and the two ports are this
// design's choice.  The array is not reset; read data registers are.
module dp_ram #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A
  input  logic          ce_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  // port B
  input  logic          ce_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  wdata_b,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce_a && we_a) mem[addr_a] <= wdata_a;
    if (ce_b && we_b) mem[addr_b] <= wdata_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata_a <= '0;
      rdata_b <= '0;
    end else begin
      if (ce_a) rdata_a <= mem[addr_a];
      if (ce_b) rdata_b <= mem[addr_b];
    end
  end

endmodule
