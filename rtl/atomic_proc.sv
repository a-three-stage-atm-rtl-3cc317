// atomic_proc: one processor X_ij of the path-allocation array.
//
// It executes the atomic(i, r, j) procedure once per iteration:
//   R = min(K, A, B);  K -= R;  A -= R;  B -= R.
// K (outstanding requests from input module i for output module j) stays
// in the processor. A (free links input module i -> intermediate module r)
// and B (free links intermediate module r -> output module j) are held in
// registers and leave, already reduced by R, on a_out / b_out towards the
// next processor in the row (A) and in the column (B).
//
// Interface and timing: `load` (one cycle) loads K, A and B. Each cycle
// with `step` high is one iteration: at the clock edge K takes K - R and
// A / B take the values arriving on a_in / b_in from the neighbours. R is
// combinational from the registers, so k, r, a_out and b_out are valid in
// the same cycle. The document's processor is bit-serial (nine clocks per
// iteration); this one works on whole words, one iteration per clock,
// which is this design's choice.
module atomic_proc #(
  parameter int unsigned CW = 7   // width of K, A and B
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          step,
  input  logic [CW-1:0] k_init,
  input  logic [CW-1:0] a_init,
  input  logic [CW-1:0] b_init,
  input  logic [CW-1:0] a_in,
  input  logic [CW-1:0] b_in,
  output logic [CW-1:0] a_out,
  output logic [CW-1:0] b_out,
  output logic [CW-1:0] k,
  output logic [CW-1:0] r
);
  logic [CW-1:0] k_q, a_q, b_q, ab_min;

  always_comb begin
    ab_min = (a_q < b_q) ? a_q : b_q;
    r      = (k_q < ab_min) ? k_q : ab_min;
    a_out  = a_q - r;
    b_out  = b_q - r;
    k      = k_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q <= '0;
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      k_q <= k_init;
      a_q <= a_init;
      b_q <= b_init;
    end else if (step) begin
      k_q <= k_q - r;
      a_q <= a_in;
      b_q <= b_in;
    end
  end
endmodule
