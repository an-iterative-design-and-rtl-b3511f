// xiv_axil_wrapper: AXI4-Lite slave that makes the xinterval core a
// memory-mapped peripheral of the Zynq processing system.
//
// As in the published Zynq deployment, the slave holds an instruction
// register and a result register around the core. The register map below is
// this design's own (32-bit data bus, byte addresses):
//   0x00 INSTR     R/W  instruction word; a write issues it to the core
//   0x04 DATA_LO   R/W  data word bits 31:0  (used by the load instruction)
//   0x08 DATA_HI   R/W  data word bits 63:32
//   0x10 RESULT_LO R    result bits 31:0
//   0x14 RESULT_HI R    result bits 63:32
//   0x18 STATUS    R    bit 0 done (result valid, cleared by an INSTR write),
//                       bit 1 busy, bit 2 illegal instruction
// A driver writes DATA_LO/DATA_HI (for a load), then INSTR, polls STATUS
// until done, and reads RESULT. An INSTR write while the core is busy is
// not issued. Unmapped addresses read as 0 and ignore writes; all responses
// are OKAY. Byte strobes are honoured on the writable registers.
//
// Handshakes: the write address and write data channels are accepted
// independently; the write takes effect, and BVALID rises, once both have
// been seen. A read is answered with RVALID the cycle after ARVALID is
// accepted. Outstanding depth is one per direction.
module xiv_axil_wrapper
  import xiv_pkg::*;
#(
  parameter int unsigned ADDR_W   = 8,
  parameter int unsigned LAT_ADD  = 1,
  parameter int unsigned LAT_MUL  = 1,
  parameter int unsigned LAT_MISC = 1
) (
  input  logic              aclk,
  input  logic              aresetn,
  // write address
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  // write data
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  // write response
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  // read address
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  // read data
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready
);

  localparam logic [ADDR_W-1:0] A_INSTR  = ADDR_W'('h00);
  localparam logic [ADDR_W-1:0] A_DATALO = ADDR_W'('h04);
  localparam logic [ADDR_W-1:0] A_DATAHI = ADDR_W'('h08);
  localparam logic [ADDR_W-1:0] A_RESLO  = ADDR_W'('h10);
  localparam logic [ADDR_W-1:0] A_RESHI  = ADDR_W'('h14);
  localparam logic [ADDR_W-1:0] A_STATUS = ADDR_W'('h18);

  logic [31:0]      instr_reg;
  logic [XLEN-1:0]  data_reg;
  logic [XLEN-1:0]  result_reg;
  logic             done_flag, illegal_flag;

  logic             aw_got, w_got;
  logic [ADDR_W-1:0] aw_addr;
  logic [31:0]      w_data;
  logic [3:0]       w_strb;
  logic             do_write;

  logic             core_en, core_done, core_illegal, core_busy;
  logic [XLEN-1:0]  core_result;

  xiv_core #(.LAT_ADD(LAT_ADD), .LAT_MUL(LAT_MUL), .LAT_MISC(LAT_MISC)) u_core (
    .clk(aclk), .rst_n(aresetn),
    .enable(core_en),
    .instr('{data: data_reg, word: instr_reg}),
    .result(core_result),
    .done(core_done),
    .illegal(core_illegal),
    .busy(core_busy)
  );

  function automatic logic [31:0] apply_strb(logic [31:0] old, logic [31:0] nw, logic [3:0] st);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = st[i] ? nw[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  assign s_axi_awready = !aw_got && !s_axi_bvalid;
  assign s_axi_wready  = !w_got && !s_axi_bvalid;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;
  assign do_write      = aw_got && w_got;

  // ---- write channel ----
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      aw_got       <= 1'b0;
      w_got        <= 1'b0;
      aw_addr      <= '0;
      w_data       <= '0;
      w_strb       <= '0;
      s_axi_bvalid <= 1'b0;
      instr_reg    <= '0;
      data_reg     <= '0;
      core_en      <= 1'b0;
      result_reg   <= '0;
      done_flag    <= 1'b0;
      illegal_flag <= 1'b0;
    end else begin
      core_en <= 1'b0;
      if (s_axi_awvalid && s_axi_awready) begin
        aw_got  <= 1'b1;
        aw_addr <= s_axi_awaddr;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_got  <= 1'b1;
        w_data <= s_axi_wdata;
        w_strb <= s_axi_wstrb;
      end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      if (core_done) begin
        result_reg   <= core_result;
        done_flag    <= 1'b1;
        illegal_flag <= core_illegal;
      end

      if (do_write) begin
        aw_got       <= 1'b0;
        w_got        <= 1'b0;
        s_axi_bvalid <= 1'b1;
        case ({aw_addr[ADDR_W-1:2], 2'b00})
          A_INSTR: begin
            instr_reg <= apply_strb(instr_reg, w_data, w_strb);
            if (!core_busy) begin
              core_en      <= 1'b1;
              done_flag    <= 1'b0;
              illegal_flag <= 1'b0;
            end
          end
          A_DATALO: data_reg[31:0]  <= apply_strb(data_reg[31:0], w_data, w_strb);
          A_DATAHI: data_reg[63:32] <= apply_strb(data_reg[63:32], w_data, w_strb);
          default: ;
        endcase
      end
    end
  end

  // ---- read channel ----
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        case ({s_axi_araddr[ADDR_W-1:2], 2'b00})
          A_INSTR:  s_axi_rdata <= instr_reg;
          A_DATALO: s_axi_rdata <= data_reg[31:0];
          A_DATAHI: s_axi_rdata <= data_reg[63:32];
          A_RESLO:  s_axi_rdata <= result_reg[31:0];
          A_RESHI:  s_axi_rdata <= result_reg[63:32];
          A_STATUS: s_axi_rdata <= {29'd0, illegal_flag, core_busy || core_en, done_flag};
          default:  s_axi_rdata <= '0;
        endcase
      end
    end
  end

  // AXI rule: a response stays valid until it is taken
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                                  s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                                  s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
