// cfg_chain: configuration memory of the fabric.
//
// Holds every reconfigurable bit as one W-bit register loaded serially:
// while shift_en is high, each rising clock edge moves the register up by
// one bit and takes sdi into bit 0, so the last W bits shifted in, first
// bit first, end up as cfg[W-1:0] with the first one at cfg[W-1]. sdo is
// the top bit, for chaining several fabrics. The architecture only says the
// fabric is configured through reconfigurable bits after fabrication; the
// serial chain is this design's choice, as it suits a core that is
// synthesised into a larger chip. The register is not reset: a
// configuration survives a reset of the FSM.
module cfg_chain #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         shift_en,
  input  logic         sdi,
  output logic [W-1:0] cfg,
  output logic         sdo
);

  always_ff @(posedge clk) begin
    if (shift_en) cfg <= {cfg[W-2:0], sdi};
  end

  assign sdo = cfg[W-1];

endmodule
