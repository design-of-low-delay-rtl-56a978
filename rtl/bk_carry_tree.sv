// bk_carry_tree -- carry generation stage of the Brent-Kung adder.
//
// Turns the bit generate/propagate vectors and the carry-in into every carry
// c[i] (the carry out of bit i, counting the carry-in) with a Brent-Kung
// parallel-prefix network:
//
//   * bit 0: the carry-in cell folds cin into G0, giving c[0] directly;
//   * up-sweep, levels l = 0 .. L-1 (L = clog2(WIDTH)), distance d = 2**l:
//     every bit i with (i+1) a multiple of 2d merges its group with the group
//     ending at bit i-d. A merged group that reaches bit 0 is a final carry
//     and uses a gray cell; every other merge is a black cell, because its
//     group propagate is needed again by a later level;
//   * down-sweep, levels l = L-2 .. 0: every bit i with (i+1) an odd multiple
//     of d = 2**l (except d itself) merges with the finished carry at bit i-d
//     through a gray cell.
//
// For WIDTH = 32 this is 31 up-sweep cells (5 of them gray) and 26 down-sweep
// gray cells, 2*L-1 = 9 cell levels. Each level is one generate block holding
// that level's g/p vectors; bits that have no cell at a level pass through.
// The bit pairing follows the textbook Brent-Kung construction: the adder's
// diagrams give the slice boundaries and cell types but not a readable
// cell-by-cell wiring, so the tree itself is this design's own choice. Any
// WIDTH >= 2 works; bits above WIDTH-1 are simply not built. The last level's
// propagate vector is read by nothing (lint reports it unused); it is kept so
// every level has the same shape.
//
// Interface: g, p from pre-processing, cin the adder carry-in; c[i] out.
// Timing: purely combinational; delay is 1 + (2*L-1) AND-OR levels.
module bk_carry_tree #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] g,
  input  logic [WIDTH-1:0] p,
  input  logic             cin,
  output logic [WIDTH-1:0] c
);

  localparam int unsigned L      = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned NSTAGE = 2 * L - 1;

  // Stage 0: bit generates with the carry-in merged into bit 0.
  logic c0;
  bk_cin_cell u_cin (.g0(g[0]), .p0(p[0]), .cin(cin), .c0(c0));

  for (genvar s = 0; s <= NSTAGE; s++) begin : stg
    logic [WIDTH-1:0] gs;
    logic [WIDTH-1:0] ps;

    if (s == 0) begin : g_init
      always_comb begin
        gs    = g;
        gs[0] = c0;
        ps    = p;
      end
    end else begin : g_level
      // Up-sweep for s = 1..L (level s-1), down-sweep after (level 2L-1-s).
      localparam bit          UP = (s <= L);
      localparam int unsigned D  = UP ? (1 << (s - 1)) : (1 << (2 * L - 1 - s));

      for (genvar i = 0; i < WIDTH; i++) begin : bit_i
        if (UP && ((i + 1) % (2 * D) == 0) && (i + 1 == 2 * D)) begin : gray_up
          bk_gray_cell u_gc (
            .g_hi (stg[s-1].gs[i]), .p_hi(stg[s-1].ps[i]),
            .g_lo (stg[s-1].gs[i-D]),
            .g_out(gs[i])
          );
          assign ps[i] = stg[s-1].ps[i];
        end else if (UP && ((i + 1) % (2 * D) == 0)) begin : black_up
          bk_black_cell u_bc (
            .g_hi (stg[s-1].gs[i]), .p_hi(stg[s-1].ps[i]),
            .g_lo (stg[s-1].gs[i-D]), .p_lo(stg[s-1].ps[i-D]),
            .g_out(gs[i]), .p_out(ps[i])
          );
        end else if (!UP && ((i + 1) % (2 * D) == D) && (i + 1 > 2 * D)) begin : gray_down
          bk_gray_cell u_gc (
            .g_hi (stg[s-1].gs[i]), .p_hi(stg[s-1].ps[i]),
            .g_lo (stg[s-1].gs[i-D]),
            .g_out(gs[i])
          );
          assign ps[i] = stg[s-1].ps[i];
        end else begin : pass
          assign gs[i] = stg[s-1].gs[i];
          assign ps[i] = stg[s-1].ps[i];
        end
      end
    end
  end

  assign c = stg[NSTAGE].gs;

endmodule
