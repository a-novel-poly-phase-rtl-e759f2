// mac_network: L-tap poly-phase filter built as a chain of L/2 MAC cells.
//
// The input is a window of L/2 even/odd sample pairs, pair m being m pairs
// old: (x_even[m], x_odd[m]) = (x[2(n-m)], x[2(n-m)+1]). The network computes
//     y[n] = sum_k COEF[k] * x[2n+1-k]
//          = sum_m COEF[2m] * x_odd[m] + COEF[2m+1] * x_even[m]
// so the odd-phase sub-filter holds the even-numbered taps and the
// even-phase sub-filter the odd-numbered ones. Cell m handles pair m; its
// partial sum goes to cell m+1. Every cell is registered, which keeps the
// critical path at one multiply and one add however long the filter is; to
// line up with the partial sums, pair m is delayed m cycles before cell m
// (input skew registers). The sum is kept at full precision (AW bits).
//
// Timing: fully pipelined, one window per cycle, latency L/2 cycles from
// in_valid to out_valid. No stall: data simply flow. ARRAY_MULT selects
// the multiplier style of the cells (see mac_cell).
// The chain of registered cells is this design's reading of the source's
// "MAC cell network" aimed at the shortest critical path.
module mac_network #(
  parameter int DW = dwt_pkg::DW,
  parameter int CW = dwt_pkg::CW,
  parameter int L  = dwt_pkg::TAPS,
  parameter int AW = dwt_pkg::acc_width(dwt_pkg::DW, dwt_pkg::CW, dwt_pkg::TAPS),
  parameter logic [L-1:0][CW-1:0] COEF = dwt_pkg::HAAR_LO,
  parameter bit ARRAY_MULT = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic [L/2-1:0][DW-1:0]     x_even,
  input  logic [L/2-1:0][DW-1:0]     x_odd,
  output logic                       out_valid,
  output logic signed [AW-1:0]       y
);
  localparam int NC = L / 2;

  logic [NC:0][AW-1:0] partial;   // partial[m] enters cell m
  logic [NC-1:0]       vpipe;

  assign partial[0] = '0;

  for (genvar m = 0; m < NC; m++) begin : g_cell
    logic [DW-1:0] xe_s, xo_s;
    if (m == 0) begin : g_nodly
      assign xe_s = x_even[0];
      assign xo_s = x_odd[0];
    end else begin : g_dly
      logic [m-1:0][DW-1:0] de, dov;
      always_ff @(posedge clk) begin
        if (rst) begin
          de  <= '0;
          dov <= '0;
        end else begin
          de[0]  <= x_even[m];
          dov[0] <= x_odd[m];
          for (int i = 1; i < m; i++) begin
            de[i]  <= de[i-1];
            dov[i] <= dov[i-1];
          end
        end
      end
      assign xe_s = de[m-1];
      assign xo_s = dov[m-1];
    end

    mac_cell #(.DW(DW), .CW(CW), .AW(AW), .ARRAY_MULT(ARRAY_MULT)) u_cell (
      .clk    (clk),
      .rst    (rst),
      .x_even (xe_s),
      .x_odd  (xo_s),
      .c_even (COEF[2*m+1]),
      .c_odd  (COEF[2*m]),
      .acc_in (partial[m]),
      .acc_out(partial[m+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else begin
      vpipe[0] <= in_valid;
      for (int i = 1; i < NC; i++) vpipe[i] <= vpipe[i-1];
    end
  end

  assign out_valid = vpipe[NC-1];
  assign y         = signed'(partial[NC]);

  initial begin
    assert (L >= 2 && L % 2 == 0) else $error("mac_network: L must be even and >= 2");
  end
endmodule
