// xiv_core: the xinterval coprocessor core, a simplified RISC pipeline that
// executes one interval instruction at a time for a host.
//
// Stages, as in the published block diagram: fetch/decode (xiv_decode)
// captures the instruction on `enable`; the register file (xiv_regfile)
// supplies both source operands; execute (xiv_execute) runs the interval
// operator; write-back stores the result in rd and presents it on `result`
// with a one-cycle `done` pulse. The host keeps the register file in step with
// its own floating-point registers with OP_LOAD and reads values back with
// OP_READ. Only one instruction is in flight, so there are no hazards.
//
// Timing (this design's own): with `enable` sampled at clock edge 0, operands
// are read and execution starts at edge 1 and `done` is high in the cycle
// after edge 1 + LAT (LAT = operator latency, 1 by default), i.e. LAT + 2
// cycles after enable. rd is written at the edge that ends the done cycle, and
// a new instruction may be enabled in the done cycle. `enable` while `busy`
// is ignored. An illegal instruction writes nothing and answers with `done`,
// `illegal` = 1 and result 0 two cycles after enable.
module xiv_core
  import xiv_pkg::*;
#(
  parameter int unsigned LAT_ADD  = 1,
  parameter int unsigned LAT_MUL  = 1,
  parameter int unsigned LAT_MISC = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  xiv_instr_t instr,
  output logic [XLEN-1:0] result,
  output logic       done,
  output logic       illegal,
  output logic       busy
);

  logic      dec_valid;
  xiv_dec_t  dec;
  interval_t rs1_val, rs2_val;
  logic      ex_busy, ex_done;
  interval_t ex_result;
  logic      ex_start;
  logic      wb_pending;
  logic [4:0] wb_rd;
  logic      ill_done;

  xiv_decode u_decode (
    .clk, .rst_n,
    .enable(enable && !busy),
    .instr,
    .valid(dec_valid),
    .dec
  );

  xiv_regfile #(.N(NREGS)) u_regfile (
    .clk, .rst_n,
    .raddr_a(dec.rs1), .rdata_a(rs1_val),
    .raddr_b(dec.rs2), .rdata_b(rs2_val),
    .we(ex_done && wb_pending),
    .waddr(wb_rd),
    .wdata(ex_result)
  );

  assign ex_start = dec_valid && dec.legal;

  xiv_execute #(.LAT_ADD(LAT_ADD), .LAT_MUL(LAT_MUL), .LAT_MISC(LAT_MISC)) u_execute (
    .clk, .rst_n,
    .start(ex_start),
    .op_in(dec.op),
    .a_in(rs1_val),
    .b_in(rs2_val),
    .data_in(dec.data),
    .busy(ex_busy),
    .done(ex_done),
    .result(ex_result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_pending <= 1'b0;
      wb_rd      <= '0;
      ill_done   <= 1'b0;
    end else begin
      ill_done <= dec_valid && !dec.legal;
      if (ex_start) begin
        wb_pending <= dec.wr_en;
        wb_rd      <= dec.rd;
      end else if (ex_done) begin
        wb_pending <= 1'b0;
      end
    end
  end

  assign busy    = dec_valid || ex_busy;
  assign done    = ex_done || ill_done;
  assign illegal = ill_done;
  assign result  = ill_done ? '0 : XLEN'(ex_result);

  // one instruction in flight at a time
  a_single_issue: assert property (@(posedge clk) disable iff (!rst_n)
                                   dec_valid |-> !ex_busy);

endmodule
