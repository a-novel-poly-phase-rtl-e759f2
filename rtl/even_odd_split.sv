// even_odd_split: poly-phase input splitter.
//
// Takes a frame of N samples in parallel (sample i in frame[i]) and streams
// it as N/2 even/odd pairs, one pair per clock: in cycle n of the frame it
// presents x_even = frame[2n] and x_odd = frame[2n+1], with out_valid high
// (the clock-enable-out of the stage that follows). Feeding two samples per
// clock is what doubles the sample rate of the poly-phase filter bank over
// a direct-form one: an 8-sample frame takes 4 clocks.
//
// Interface: load is honoured when ready is high. ready is high when idle
// and also in the cycle that sends the last pair of a frame, so frames can
// follow one another with no gap. A load while ready is low is a protocol
// error (assertion). Timing: the first pair of a frame appears the cycle
// after load; frame_first / frame_last mark its first and last pair.
// Splitting a whole frame, and the frame-level handshake, are this design's
// reading of the splitter; the even/odd assignment follows the source.
module even_odd_split #(
  parameter int XW = dwt_pkg::XW,
  parameter int N  = dwt_pkg::FRAME
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic [N-1:0][XW-1:0] frame,
  output logic                 ready,
  output logic                 out_valid,
  output logic                 frame_first,
  output logic                 frame_last,
  output logic [XW-1:0]        x_even,
  output logic [XW-1:0]        x_odd
);
  localparam int NP = N / 2;
  localparam int CNTW = (NP > 1) ? $clog2(NP) : 1;

  logic [N-1:0][XW-1:0] buf_q;
  logic                 busy;
  logic [CNTW-1:0]      cnt;
  logic                 last;

  assign last  = busy && (cnt == CNTW'(NP - 1));
  assign ready = !busy || last;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      cnt   <= '0;
      buf_q <= '0;
    end else if (load && ready) begin
      busy  <= 1'b1;
      cnt   <= '0;
      buf_q <= frame;
    end else if (last) begin
      busy  <= 1'b0;
      cnt   <= '0;
    end else if (busy) begin
      cnt   <= cnt + 1'b1;
    end
  end

  always_comb begin
    out_valid   = busy;
    frame_first = busy && (cnt == '0);
    frame_last  = last;
    x_even      = buf_q[2 * cnt];
    x_odd       = buf_q[2 * cnt + 1];
  end

  assert property (@(posedge clk) disable iff (rst) load |-> ready)
    else $error("even_odd_split: load while busy");

  initial begin
    assert (N >= 2 && N % 2 == 0) else $error("even_odd_split: N must be even");
  end
endmodule
