// path_alloc_array: the array of atomic() processors that allocates paths
// through the intermediate stage.
//
// The array is a torus of MP x MP cells, MP = max(L1, L2, M). Cell (i, j)
// starts with K_ij (requests from input module i for output module j),
// A_i,r and B_r,j for r = (i + j) mod MP. A is S1 when input module i and
// intermediate module r exist, else 0; B is S2 when intermediate module r
// and output module j exist, else 0. In iteration k cell (i, j) runs
// atomic(i, (i + j - k) mod MP, j); afterwards it passes the reduced A to
// cell (i, j + 1) and the reduced B to cell (i + 1, j), both modulo MP, and
// keeps K. After MP iterations every (input, intermediate, output) triple
// has been tried once. Cells with i >= L1 or j >= L2 never change A or B,
// so they are plain delay registers rather than processors.
//
// Interface and timing: pulse `load` for one cycle with k0 valid; then
// hold `step` high for MP cycles, one iteration per clock. k shows the
// outstanding requests of each processor after the iterations done so far,
// r the number routed in the current iteration. All of this follows the
// document; one iteration per clock (word-parallel) is this design's choice.
module path_alloc_array #(
  parameter int unsigned L1 = 32,
  parameter int unsigned L2 = 32,
  parameter int unsigned M  = 32,
  parameter int unsigned S1 = 4,
  parameter int unsigned S2 = 8,
  parameter int unsigned CW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          step,
  input  logic [CW-1:0] k0 [L1][L2],
  output logic [CW-1:0] k  [L1][L2],
  output logic [CW-1:0] r  [L1][L2]
);
  localparam int unsigned MP = atm_pkg::max3(L1, L2, M);

  logic [CW-1:0] a_out [MP][MP];
  logic [CW-1:0] b_out [MP][MP];

  for (genvar i = 0; i < MP; i++) begin : g_row
    for (genvar j = 0; j < MP; j++) begin : g_col
      localparam int unsigned RR = (i + j) % MP;
      localparam logic [CW-1:0] AINIT = (i < L1 && RR < M) ? CW'(S1) : '0;
      localparam logic [CW-1:0] BINIT = (j < L2 && RR < M) ? CW'(S2) : '0;
      if (i < L1 && j < L2) begin : g_proc
        atomic_proc #(.CW(CW)) u_proc (
          .clk    (clk),
          .rst_n  (rst_n),
          .load   (load),
          .step   (step),
          .k_init (k0[i][j]),
          .a_init (AINIT),
          .b_init (BINIT),
          .a_in   (a_out[i][(j + MP - 1) % MP]),
          .b_in   (b_out[(i + MP - 1) % MP][j]),
          .a_out  (a_out[i][j]),
          .b_out  (b_out[i][j]),
          .k      (k[i][j]),
          .r      (r[i][j])
        );
      end else begin : g_delay
        logic [CW-1:0] a_q, b_q;
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            a_q <= '0;
            b_q <= '0;
          end else if (load) begin
            a_q <= AINIT;
            b_q <= BINIT;
          end else if (step) begin
            a_q <= a_out[i][(j + MP - 1) % MP];
            b_q <= b_out[(i + MP - 1) % MP][j];
          end
        end
        assign a_out[i][j] = a_q;
        assign b_out[i][j] = b_q;
      end
    end
  end
endmodule
