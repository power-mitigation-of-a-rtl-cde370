// pe_array: ROWS x COLS array of rpe processing elements with the CGRA's
// point-to-point interconnect.
//
// Each PE chooses each of its two operands from eight sources (pe_src_e):
// the OUT1 of the PE above, above-left or above-right, the OUT2 of the PE
// above, the OUT1 of its left neighbour (horizontal), its own OUT1 (loop),
// the OUT1 of the PE two rows up (interleaved) or the input I/O buffer word
// of its column (global line).  For row 0 the "row above" (and for rows 0
// and 1 the interleaved row) is the input I/O buffer: word 2c acts as OUT1
// and word 2c+1 as OUT2 of column c.  Neighbours outside the array read 0.
//
// Timing: each row is one register stage (the operand registers of its
// PEs), enabled by its row-valid bit vld[r].  The outputs of the last row
// are presented as 2*COLS words, word 2c = OUT1, word 2c+1 = OUT2 of
// column c.
//
// Following the document: the PE grid, the neighbour, loop, interleaved
// and global routing kinds.  The exact source set and the edge behaviour
// are this design's choice.
module pe_array
  import harp_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ce,
  input  logic                          clr,
  input  logic [ROWS-1:0]               vld,
  input  pe_cfg_t [ROWS-1:0][COLS-1:0]  cfg,
  input  logic [2*COLS-1:0][DW-1:0]     bin,
  output logic [2*COLS-1:0][DW-1:0]     bout
);

  logic [DW-1:0] o1 [ROWS][COLS];
  logic [DW-1:0] o2 [ROWS][COLS];

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      logic [DW-1:0] up1, up2, upl, upr, left, ilv, in1, in2;

      // neighbour values
      if (r == 0) begin : g_top
        assign up1 = bin[2*c];
        assign up2 = bin[2*c+1];
        if (c > 0) begin : g_l
          assign upl = bin[2*(c-1)];
        end else begin : g_nl
          assign upl = '0;
        end
        if (c < int'(COLS) - 1) begin : g_r
          assign upr = bin[2*(c+1)];
        end else begin : g_nr
          assign upr = '0;
        end
      end else begin : g_inner
        assign up1 = o1[r-1][c];
        assign up2 = o2[r-1][c];
        if (c > 0) begin : g_l
          assign upl = o1[r-1][c-1];
        end else begin : g_nl
          assign upl = '0;
        end
        if (c < int'(COLS) - 1) begin : g_r
          assign upr = o1[r-1][c+1];
        end else begin : g_nr
          assign upr = '0;
        end
      end
      if (r >= 2) begin : g_ilv
        assign ilv = o1[r-2][c];
      end else begin : g_nilv
        assign ilv = bin[2*c];
      end
      if (c > 0) begin : g_left
        assign left = o1[r][c-1];
      end else begin : g_nleft
        assign left = '0;
      end

      function automatic logic [DW-1:0] pick(input pe_src_e s, input logic [DW-1:0] glob,
                                             input logic [DW-1:0] u1, input logic [DW-1:0] u2,
                                             input logic [DW-1:0] ul, input logic [DW-1:0] ur,
                                             input logic [DW-1:0] lf, input logic [DW-1:0] lp,
                                             input logic [DW-1:0] il);
        unique case (s)
          S_UP:      return u1;
          S_UPLEFT:  return ul;
          S_UPRIGHT: return ur;
          S_UP2:     return u2;
          S_LEFT:    return lf;
          S_LOOP:    return lp;
          S_ILV:     return il;
          default:   return glob;
        endcase
      endfunction

      assign in1 = pick(cfg[r][c].src1, bin[2*c],   up1, up2, upl, upr, left, o1[r][c], ilv);
      assign in2 = pick(cfg[r][c].src2, bin[2*c+1], up1, up2, upl, upr, left, o1[r][c], ilv);

      rpe u_pe (
        .clk  (clk),
        .rst_n(rst_n),
        .ce   (ce),
        .en   (vld[r]),
        .clr  (clr),
        .cfg  (cfg[r][c]),
        .in1  (in1),
        .in2  (in2),
        .out1 (o1[r][c]),
        .out2 (o2[r][c])
      );
    end
  end

  for (genvar c = 0; c < int'(COLS); c++) begin : g_out
    assign bout[2*c]   = o1[ROWS-1][c];
    assign bout[2*c+1] = o2[ROWS-1][c];
  end

endmodule
