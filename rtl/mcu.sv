// mcu -- core cell of the reconfigurable DWT processing element.
//
// A three-input, one-output datapath: an adder/subtractor, a multiplier by
// the lifting coefficient alpha, and a final adder. The mode input picks
// one of the three basic computing units of a lifting step:
//   MCU_ADD    D = A + alpha*(B + C)
//   MCU_SUB    D = A + alpha*(B - C)
//   MCU_SINGLE D = A + alpha*B
// alpha is a signed fixed-point number with COEF_FRAC fraction bits. The
// product is rounded half up before the final addition, which for
// alpha = -1/2 and +1/4 gives exactly the integer-to-integer (5,3) lifting
// steps. The result wraps to DATA_W bits. The cell structure is the
// document's; the number formats and the rounding are this design's own.
// Purely combinational: the PE registers the result.
module mcu
  import dwt_pkg::*;
#(
  parameter int DATA_W    = dwt_pkg::C_DATA_W,
  parameter int COEF_W    = dwt_pkg::C_COEF_W,
  parameter int COEF_FRAC = dwt_pkg::C_COEF_FRAC
) (
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [DATA_W-1:0] b,
  input  logic signed [DATA_W-1:0] c,
  input  mcu_mode_e                mode,
  input  logic signed [COEF_W-1:0] coef,
  output logic signed [DATA_W-1:0] d
);

  localparam int PROD_W = DATA_W + 1 + COEF_W;

  logic signed [DATA_W:0]   bc;
  logic signed [PROD_W-1:0] prod;
  logic signed [PROD_W-1:0] rnd;

  always_comb begin
    unique case (mode)
      MCU_ADD: bc = (DATA_W+1)'(b) + (DATA_W+1)'(c);
      MCU_SUB: bc = (DATA_W+1)'(b) - (DATA_W+1)'(c);
      default: bc = (DATA_W+1)'(b);
    endcase
    prod = PROD_W'(bc) * PROD_W'(coef);
    rnd  = (prod + PROD_W'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    d    = a + rnd[DATA_W-1:0];
  end

endmodule
