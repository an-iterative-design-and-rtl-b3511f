// xiv_decode: fetch/decode stage of the xinterval core.
//
// When `enable` is high the instruction presented by the host (32-bit
// RISC-V R-type word plus a 64-bit data word) is captured and decoded in the
// same clock edge: `dec` then holds the operation, register indices and
// whether rd is written, and `valid` is high for one cycle. An instruction
// that is not on the custom-0 opcode with funct3 = 0, or whose funct7 is not
// a known operation, is marked not legal. The stage sits where the published
// pipeline puts it, with the instruction and enable inputs; the encoding is
// this design's own choice (see xiv_pkg).
module xiv_decode
  import xiv_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  xiv_instr_t instr,
  output logic       valid,
  output xiv_dec_t   dec
);

  xiv_dec_t d;
  logic [6:0] f7;

  always_comb begin
    f7       = instr.word[31:25];
    d        = '0;
    d.rd     = instr.word[11:7];
    d.rs1    = instr.word[19:15];
    d.rs2    = instr.word[24:20];
    d.data   = instr.data;
    d.op     = xiv_op_e'(f7);
    d.legal  = (instr.word[6:0] == OPC_CUSTOM0) && (instr.word[14:12] == 3'b000) &&
               (f7 <= 7'(OP_HULL));
    d.wr_en  = d.legal && (f7 != 7'(OP_READ));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      dec   <= '0;
    end else begin
      valid <= enable;
      if (enable) dec <= d;
    end
  end

endmodule
