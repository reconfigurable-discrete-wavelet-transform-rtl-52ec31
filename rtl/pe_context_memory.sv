// pe_context_memory -- PE context memory of the reconfigurable DWT engine.
//
// Holds the hardware configurations of the PE array, one filter kernel per
// entry (pe_ctx_t: fold factor, number of lifting steps, and the target,
// MCU mode and coefficient of every step). Entries 0..PE_PLA_ENTRIES-1 are
// fixed default configurations held in combinational logic (the PLA part):
// entry 0 is the (5,3) filter, entry 1 the (9,7) filter. Entries from
// PE_PLA_ENTRIES upward are a small RAM that the user writes with any
// other lifting factorisation (the RAM part).
//
// Interface: sel chooses the entry, ctx presents it combinationally; a
// write with we/waddr/wdata stores into RAM entry waddr at the clock edge.
// The PLA/RAM split follows the document; the entry format, the two
// default kernels and the RAM size of RAM_DEPTH entries are this design's.
module pe_context_memory
  import dwt_pkg::*;
#(
  parameter int RAM_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sel,
  output pe_ctx_t    ctx,
  input  logic       we,
  input  logic [1:0] waddr,
  input  pe_ctx_t    wdata
);

  pe_ctx_t ram [RAM_DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RAM_DEPTH; i++) ram[i] <= '0;
    end else if (we && int'(waddr) < RAM_DEPTH) begin
      ram[waddr] <= wdata;
    end
  end

  always_comb begin
    if (int'(sel) < PE_PLA_ENTRIES)
      ctx = pe_pla(sel);
    else if (int'(sel) - PE_PLA_ENTRIES < RAM_DEPTH)
      ctx = ram[int'(sel) - PE_PLA_ENTRIES];
    else
      ctx = '0;
  end

endmodule
