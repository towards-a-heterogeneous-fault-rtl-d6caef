// axil_regs: AXI4-Lite slave with one processor's bank of lockstep registers.
//
// The accelerator has one of these per processor, each on its own slave port,
// so a processor can reach only its own bank. The bank is eight 32-bit words
// decoded from address bits 4:0 (the upper bits select the peripheral in the
// system map and are ignored here): DATA at 0x00, CONTROL at 0x04, TIMEOUT at
// 0x08, STATUS at 0x1C, and unused words at 0x0C..0x18 that read as zero and
// ignore writes. STATUS is read-only and comes from the accelerator core. In
// CONTROL, b_ready_to_sync is an ordinary read/write bit, while b_Tx and
// error_fixed are write-1-to-set and cleared by the core (tx_clr, fix_clr), so
// a read-modify-write by the processor can never undo a clear by hardware.
//
// Bus timing: a write is taken when AWVALID and WVALID are both high and no
// response is pending (AWREADY and WREADY are raised together in that cycle);
// BVALID follows one cycle later and is held until BREADY. A read is taken
// when no read data is pending; RVALID follows one cycle later and is held
// until RREADY. Byte strobes are honoured. All responses are OKAY. The register
// names and offsets follow the published register map; the bit layout, the
// handshake timing and the write-1-to-set bits are this design's choices.
module axil_regs
  import xlockstep_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   req,
  output axil_rsp_t   rsp,
  output logic [31:0] data_o,
  output logic        rts_o,
  output logic        tx_o,
  output logic        fix_o,
  output logic [31:0] timeout_o,
  input  logic [31:0] status_i,
  input  logic        tx_clr,
  input  logic        fix_clr
);
  logic        bvalid_q, rvalid_q;
  logic [31:0] rdata_q;
  logic [31:0] data_q, timeout_q;
  logic        rts_q, tx_q, fix_q;
  logic        wr_en, rd_en;
  logic [4:0]  wofs, rofs;
  logic [31:0] rd_mux;

  assign wr_en = req.awvalid && req.wvalid && !bvalid_q;
  assign rd_en = req.arvalid && !rvalid_q;
  assign wofs  = {req.awaddr[4:2], 2'b00};
  assign rofs  = {req.araddr[4:2], 2'b00};

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[i*8 +: 8] = strb[i] ? nw[i*8 +: 8] : old[i*8 +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q    <= '0;
      timeout_q <= '0;
      rts_q     <= 1'b0;
      tx_q      <= 1'b0;
      fix_q     <= 1'b0;
    end else begin
      if (tx_clr)  tx_q  <= 1'b0;
      if (fix_clr) fix_q <= 1'b0;
      if (wr_en) begin
        unique case (wofs)
          OFS_DATA:    data_q    <= merge(data_q, req.wdata, req.wstrb);
          OFS_TIMEOUT: timeout_q <= merge(timeout_q, req.wdata, req.wstrb);
          OFS_CONTROL: if (req.wstrb[0]) begin
            rts_q <= req.wdata[CTRL_RTS];
            if (req.wdata[CTRL_TX])  tx_q  <= 1'b1;
            if (req.wdata[CTRL_FIX]) fix_q <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rofs)
      OFS_DATA:    rd_mux = data_q;
      OFS_CONTROL: rd_mux = {29'd0, fix_q, tx_q, rts_q};
      OFS_TIMEOUT: rd_mux = timeout_q;
      OFS_STATUS:  rd_mux = status_i;
      default:     rd_mux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_en)                         bvalid_q <= 1'b1;
      else if (bvalid_q && req.bready)   bvalid_q <= 1'b0;
      if (rd_en) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_mux;
      end else if (rvalid_q && req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_en;
    rsp.wready  = wr_en;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = AXI_RESP_OKAY;
    rsp.arready = !rvalid_q;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rdata_q;
    rsp.rresp   = AXI_RESP_OKAY;
  end

  assign data_o    = data_q;
  assign rts_o     = rts_q;
  assign tx_o      = tx_q;
  assign fix_o     = fix_q;
  assign timeout_o = timeout_q;

  // AXI rule: a response, once valid, is held until it is accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid_q && !req.bready |=> bvalid_q);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid_q && !req.rready |=> rvalid_q && $stable(rdata_q));
endmodule
