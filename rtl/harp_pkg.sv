// harp_pkg: types and constants shared by the heterogeneous multicore
// platform (CGRA nodes, RISC nodes, NoC, power management).
//
// Contents:
//  * NoC packet: one flit carrying destination node, target device,
//    source node, a 16-bit address and a 32-bit data word.
//  * PE configuration word: opcode, two operand sources, immediate select,
//    a 4-bit LUT truth table and a 16-bit immediate.
//  * Node placement on the 3x3 grid (node n sits at column n%3, row n/3)
//    and the routing function used by every switch.
//  * Frequency code to MHz conversion (16 codes, 35..200 MHz) and the
//    voltage code chosen for a frequency in DVFS mode.
// The 3x3 grid, node numbering, 16 frequency steps in 35-200 MHz, the 4-bit
// field per core and the 0.5-1.0 V operating points follow the document;
// the field layouts and encodings are this design's own choice.
package harp_pkg;

  localparam int unsigned DW = 32;          // datapath width

  // ---------------------------------------------------------------- NoC
  typedef enum logic [1:0] {
    TGT_DMEM = 2'd0,   // data memory of a RISC node
    TGT_DMA  = 2'd1,   // DMA slave of a CGRA node
    TGT_PMU  = 2'd2    // power management unit (node N4)
  } tgt_e;

  typedef struct packed {
    logic [3:0]  dst;
    tgt_e        tgt;
    logic [3:0]  src;
    logic [15:0] addr;
    logic [31:0] data;
  } noc_pkt_t;

  // Switch ports
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0, P_EAST = 3'd1, P_WEST = 3'd2, P_NORTH = 3'd3, P_SOUTH = 3'd4
  } port_e;
  localparam int unsigned NPORTS = 5;

  // Routing: a node on row 2 first climbs north (N8 hangs off N5), then
  // X first, then Y.  Deadlock free: the only Y-to-X turn is taken by
  // packets leaving the corner node N8, which nothing else depends on.
  function automatic port_e route(input logic [3:0] cur, input logic [3:0] dst);
    int unsigned cx, cy, dx, dy;
    cx = 32'(cur) % 3; cy = 32'(cur) / 3; dx = 32'(dst) % 3; dy = 32'(dst) / 3;
    if (cur == dst)        return P_LOCAL;
    else if (cy == 2)      return P_NORTH;
    else if (cx < dx)      return P_EAST;
    else if (cx > dx)      return P_WEST;
    else if (cy < dy)      return P_SOUTH;
    else                   return P_NORTH;
  endfunction

  // DMA address map (16-bit packet address)
  typedef enum logic [1:0] {
    R_MEM_IN  = 2'd0,   // first local memory  : addr[13:9] bank, addr[8:0] word
    R_MEM_OUT = 2'd1,   // second local memory : addr[13:9] bank, addr[8:0] word
    R_CONFIG  = 2'd2,   // context memory      : addr[13:12] context, addr[7:0] slot
    R_CTRL    = 2'd3    // commands            : addr[1:0] command
  } dma_region_e;

  typedef enum logic [1:0] {
    C_RUN      = 2'd0,  // data[17:16] context, data[15:0] length
    C_XFER_DST = 2'd1,  // data[19:16] node, data[15:0] base address
    C_XFER_GO  = 2'd2,  // data[20:16] bank, data[9:0] word count
    C_ACK      = 2'd3   // data[19:16] node, data[15:0] address: send cycle count, end job
  } dma_cmd_e;

  // ---------------------------------------------------------------- PE
  typedef enum logic [3:0] {
    OP_PASS = 4'd0,  // operand 1
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_MUL  = 4'd3,  // low 32 bits of the product
    OP_SHL  = 4'd4,
    OP_SHR  = 4'd5,  // logical
    OP_SRA  = 4'd6,  // arithmetic
    OP_LUT  = 4'd7,  // bitwise 2-input function from the 4-bit truth table
    OP_IMM  = 4'd8,  // immediate register
    OP_FADD = 4'd9,  // IEEE-754 single add
    OP_FMUL = 4'd10  // IEEE-754 single multiply
  } pe_op_e;

  // Operand sources of a PE at row r, column c
  typedef enum logic [2:0] {
    S_UP      = 3'd0,  // OUT1 of (r-1, c)
    S_UPLEFT  = 3'd1,  // OUT1 of (r-1, c-1)
    S_UPRIGHT = 3'd2,  // OUT1 of (r-1, c+1)
    S_UP2     = 3'd3,  // OUT2 of (r-1, c)
    S_LEFT    = 3'd4,  // OUT1 of (r, c-1)   horizontal
    S_LOOP    = 3'd5,  // own OUT1           loop
    S_ILV     = 3'd6,  // OUT1 of (r-2, c)   interleaved
    S_GLOBAL  = 3'd7   // input I/O buffer word 2c+operand (global line)
  } pe_src_e;

  typedef struct packed {
    logic [15:0] imm;      // immediate, sign-extended
    logic [3:0]  lut;      // truth table: lut[{a,b}]
    logic        spare;
    logic        use_imm;  // operand 2 mux: immediate instead of operand 2
    pe_src_e     src2;
    pe_src_e     src1;
    pe_op_e      op;
  } pe_cfg_t;

  // ---------------------------------------------------------------- power
  localparam int unsigned NCGRA = 4;        // N0, N1, N2, N8

  function automatic logic [7:0] code2mhz(input logic [3:0] code,
                                          input int unsigned fmin,
                                          input int unsigned fstep);
    return 8'(fmin + fstep * code);
  endfunction

  // Lowest supply (0.5 V + 0.1 V * code) whose maximum frequency covers f.
  // Maximum frequencies per voltage: 55, 119, 238, 366, 480, 500 MHz.
  function automatic logic [2:0] mhz2vsel(input logic [9:0] mhz);
    if (mhz <= 10'd55)       return 3'd0;
    else if (mhz <= 10'd119) return 3'd1;
    else if (mhz <= 10'd238) return 3'd2;
    else if (mhz <= 10'd366) return 3'd3;
    else if (mhz <= 10'd480) return 3'd4;
    else                     return 3'd5;
  endfunction

endpackage
