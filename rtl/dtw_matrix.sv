// dtw_matrix: N x N array of DTW unit cells (20 x 20 on the chip) wired as
// a diagonal pipeline. Cell (i,j) takes the pulses of (i-1,j), (i,j-1) and,
// through its copy WTFF, (i-1,j-1); along the top row and the left column
// those come from the boundary inputs `top_b`, `left_b` and `corner`.
// Samples of A enter each row at column 0 and move one cell to the right
// per pipeline cycle; samples of B enter each column at row 0 and move down.
// Within one pass of a section, cell (i,j) is written in pipeline cycle
// i+j+1 (counting the first cycle as 0) and sends its value in cycle i+j+2,
// so the pulses on `right_out[i]` and `bottom_out[j]` carry the section's
// results in cycles i+N+1 and j+N+1. Pad flags `a_pad`/`b_pad` enter and
// travel with the samples. In bypass mode the same wires carry the
// racing edges. `d_val` gives the digital content of every main WTFF, for
// observation only.
module dtw_matrix
  import dtw_pkg::*;
#(
  parameter int unsigned N = 20,
  parameter int unsigned M = MINP
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  ctl_t                         ctl,
  input  logic [N-1:0][DATA_W-1:0]     a_row,
  input  logic [N-1:0][DATA_W-1:0]     b_col,
  input  logic [N-1:0]                 a_pad,
  input  logic [N-1:0]                 b_pad,
  input  logic [N-1:0][N-1:0][TRIM_W-1:0] trim,
  input  logic [N-1:0]                 top_b,
  input  logic [N-1:0]                 left_b,
  input  logic                         corner,
  output logic [N-1:0]                 right_out,
  output logic [N-1:0]                 bottom_out,
  output logic [N-1:0][N-1:0][DIST_W-1:0] d_val
);
  logic [N-1:0][N-1:0]             d;
  logic [N-1:0][N-1:0][DATA_W-1:0] a_o, b_o;
  logic [N-1:0][N-1:0]             ap_o, bp_o;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic up, left, diag;
      logic [DATA_W-1:0] ai, bi;
      logic api, bpi;

      if (i == 0) begin : g_up_b
        assign up = top_b[j];
        assign bi = b_col[j];
        assign bpi = b_pad[j];
      end else begin : g_up_c
        assign up = d[i-1][j];
        assign bi = b_o[i-1][j];
        assign bpi = bp_o[i-1][j];
      end

      if (j == 0) begin : g_left_b
        assign left = left_b[i];
        assign ai   = a_row[i];
        assign api  = a_pad[i];
      end else begin : g_left_c
        assign left = d[i][j-1];
        assign ai   = a_o[i][j-1];
        assign api  = ap_o[i][j-1];
      end

      if (i == 0 && j == 0) begin : g_diag_corner
        assign diag = corner;
      end else if (i == 0) begin : g_diag_top
        assign diag = top_b[j-1];
      end else if (j == 0) begin : g_diag_left
        assign diag = left_b[i-1];
      end else begin : g_diag_cell
        assign diag = d[i-1][j-1];
      end

      dtw_cell #(.M(M)) u_cell (
        .clk, .rst_n, .ctl,
        .a_in(ai), .b_in(bi), .a_out(a_o[i][j]), .b_out(b_o[i][j]),
        .a_pad_in(api), .b_pad_in(bpi), .a_pad_out(ap_o[i][j]), .b_pad_out(bp_o[i][j]),
        .trim(trim[i][j]),
        .up_in(up), .left_in(left), .diag_in(diag),
        .d_out(d[i][j]), .d_val(d_val[i][j])
      );
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_edge
    assign right_out[k]  = d[k][N-1];
    assign bottom_out[k] = d[N-1][k];
  end
endmodule
