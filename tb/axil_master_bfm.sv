// axil_master_bfm: AXI4-Lite master model for testbenches.
// write() drives AW and W together, waits for both to be accepted and for the
// B response; read() drives AR and waits for R. Each records how many clock
// cycles the transfer took (write: posedges up to the one that samples BVALID;
// read: posedges up to the one after which RVALID is high), and
// checks that every response is OKAY. Signals change on the falling edge.
module axil_master_bfm
  import xlockstep_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  output axil_req_t req,
  input  axil_rsp_t rsp
);
  int last_write_cycles = 0;
  int last_read_cycles  = 0;
  int bad_responses     = 0;

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data, input logic [3:0] strb);
    bit aw_done = 0, w_done = 0;
    int n = 0;
    @(negedge clk);
    req.awaddr = addr; req.awvalid = 1'b1;
    req.wdata  = data; req.wstrb   = strb; req.wvalid = 1'b1;
    req.bready = 1'b1;
    while (!(aw_done && w_done)) begin
      @(posedge clk); n++;
      if (rsp.awready) aw_done = 1;
      if (rsp.wready)  w_done  = 1;
      @(negedge clk);
      if (aw_done) req.awvalid = 1'b0;
      if (w_done)  req.wvalid  = 1'b0;
    end
    forever begin
      @(posedge clk); n++;
      if (rsp.bvalid) break;
    end
    if (rsp.bresp != AXI_RESP_OKAY) bad_responses++;
    @(negedge clk);
    req.bready = 1'b0;
    last_write_cycles = n;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    int n = 0;
    @(negedge clk);
    req.araddr = addr; req.arvalid = 1'b1; req.rready = 1'b1;
    forever begin
      @(posedge clk); n++;
      if (rsp.arready) break;
    end
    @(negedge clk);
    req.arvalid = 1'b0;
    forever begin
      if (rsp.rvalid) break;
      @(posedge clk); n++;
      #1;
    end
    data = rsp.rdata;
    if (rsp.rresp != AXI_RESP_OKAY) bad_responses++;
    @(posedge clk);
    @(negedge clk);
    req.rready = 1'b0;
    last_read_cycles = n;
  endtask
endmodule
