// ag_context_memory -- AG context memory of the reconfigurable DWT engine.
//
// Holds wavelet decomposition structures as programs of pass descriptors
// (pass_t: row or column pass, level, subband offsets, last flag).
// Programs 0..2 are fixed defaults computed in combinational logic (the
// PLA part): a one-level 2-D transform, a three-level dyadic decomposition
// and a four-level full wavelet packet decomposition. Program 3 is a RAM
// of RAM_DEPTH descriptors that the user fills with any other structure,
// for instance an irregular wavelet packet tree (the RAM part).
//
// Interface: prog and idx select a descriptor, pass presents it
// combinationally; we/waddr/wdata write a RAM entry at the clock edge.
// The PLA/RAM split follows the document; the descriptor format and the
// three default programs are this design's.
module ag_context_memory
  import dwt_pkg::*;
#(
  parameter int RAM_DEPTH = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [1:0]            prog,
  input  logic [PASS_IDX_W-1:0] idx,
  output pass_t                 pass,
  input  logic                  we,
  input  logic [PASS_IDX_W-1:0] waddr,
  input  pass_t                 wdata
);

  localparam int AW = (RAM_DEPTH > 1) ? $clog2(RAM_DEPTH) : 1;

  pass_t ram [RAM_DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RAM_DEPTH; i++) ram[i] <= '0;
    end else if (we && int'(waddr) < RAM_DEPTH) begin
      ram[AW'(waddr)] <= wdata;
    end
  end

  always_comb begin
    if (int'(prog) < AG_PLA_PROGS)
      pass = ag_pla(prog, idx);
    else if (int'(idx) < RAM_DEPTH)
      pass = ram[AW'(idx)];
    else
      pass = '0;
  end

endmodule
