// dwt_buffer: stage-2 buffer that synchronises the two pipeline stages.
//
// Stage 2 computes every level j = 2..J from the approximation of level j-1,
// which comes from stage 1 (j = 2) or from stage 2 itself (j > 2). The
// buffer holds, for each of these NB = J-1 levels (entry b = level b+2):
//   hold        the even sample of a pair still waiting for its odd sample;
//   window      the newest complete pair and the L/2-1 pairs before it,
//               i.e. the delay lines of that level's poly-phase sub-filters;
//   pend        the newest pair has not been filtered yet.
// Approximations arrive one at a time. The first of two goes to hold; the
// second completes the pair, which shifts into the window and sets pend.
// The stage-2 control unit reads an entry (rd_en, rd_index) in the cycle it
// filters that level: the read returns the window combinationally and clears
// pend. A pair that completes while the previous pair of the same level is
// still pending would overwrite it: that sets the sticky overflow flag. With one pair per two cycles at level 2 and the
// stage-2 scheduler's lowest-level-first rule this never happens.
//
// Interface: s1_* writes entry 0 (level 2), fb_* writes entry fb_index
// (must be 1..NB-1). Both may write in the same cycle. Windows start at zero
// after reset. The per-level hold/window/pend organisation is this design's
// own; the source gives only the buffer's purpose.
module dwt_buffer #(
  parameter int DW = dwt_pkg::DW,
  parameter int L  = dwt_pkg::TAPS,
  parameter int NB = dwt_pkg::LEVELS - 1,
  parameter int IW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   s1_valid,
  input  logic [DW-1:0]          s1_data,
  input  logic                   fb_valid,
  input  logic [IW-1:0]          fb_index,
  input  logic [DW-1:0]          fb_data,
  input  logic                   rd_en,
  input  logic [IW-1:0]          rd_index,
  output logic [NB-1:0]          pend,
  output logic [L/2-1:0][DW-1:0] rd_even,
  output logic [L/2-1:0][DW-1:0] rd_odd,
  output logic                   overflow
);
  localparam int NC = L / 2;

  logic [NB-1:0]                   have_hold;
  logic [NB-1:0][DW-1:0]           hold;
  logic [NB-1:0][NC-1:0][DW-1:0]   win_e, win_o;
  logic [NB-1:0]                   w_valid;
  logic [NB-1:0][DW-1:0]           w_data;
  logic [NB-1:0]                   rd_hit;

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      if (b == 0) begin
        w_valid[b] = s1_valid;
        w_data[b]  = s1_data;
      end else begin
        w_valid[b] = fb_valid && (fb_index == IW'(b));
        w_data[b]  = fb_data;
      end
      rd_hit[b] = rd_en && (rd_index == IW'(b));
    end
    rd_even = win_e[rd_index];
    rd_odd  = win_o[rd_index];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      have_hold <= '0;
      hold      <= '0;
      win_e     <= '0;
      win_o     <= '0;
      pend      <= '0;
      overflow  <= 1'b0;
    end else begin
      for (int b = 0; b < NB; b++) begin
        if (rd_hit[b]) pend[b] <= 1'b0;
        if (w_valid[b]) begin
          if (!have_hold[b]) begin
            hold[b]      <= w_data[b];
            have_hold[b] <= 1'b1;
          end else begin
            win_e[b][0] <= hold[b];
            win_o[b][0] <= w_data[b];
            for (int m = 1; m < NC; m++) begin
              win_e[b][m] <= win_e[b][m-1];
              win_o[b][m] <= win_o[b][m-1];
            end
            have_hold[b] <= 1'b0;
            pend[b]      <= 1'b1;
            if (pend[b] && !rd_hit[b]) overflow <= 1'b1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) rd_en |-> (rd_index < IW'(NB)) && pend[rd_index])
    else $error("dwt_buffer: read of an entry with no pending pair");
  assert property (@(posedge clk) disable iff (rst) fb_valid |-> (fb_index != '0) && (fb_index < IW'(NB)))
    else $error("dwt_buffer: feedback write to a bad entry");
endmodule
