// xlockstep_pkg: types and constants shared by the lockstep accelerator.
//
// The accelerator gives each processor one AXI4-Lite register bank of eight
// 32-bit words (byte offsets 0x00..0x1C). Four of them are used: DATA (0x00),
// CONTROL (0x04), TIMEOUT (0x08) and STATUS (0x1C); 0x0C..0x18 are unused and
// read as zero. The offsets follow the published register map; the bit layout
// of CONTROL and STATUS is this design's own choice, since only the names of
// the control bits (b_ready_to_sync, b_Tx, b_ready) are known.
//
// CONTROL (written by the processor):
//   bit 0  b_ready_to_sync  read/write: set at a checkpoint, cleared to acknowledge b_ready
//   bit 1  b_Tx             write-1-to-set: DATA holds a new output; hardware clears it
//                           once the Checker has stored the word
//   bit 2  error_fixed      write-1-to-set: error handled; hardware clears it on recovery
// STATUS (read only):
//   bit 0  b_ready          both processors reached the synchronisation point
//   bit 1  b_Tx             copy of CONTROL.b_Tx (1 = transfer still pending)
//   bit 2  busy             this processor's LIFO is full and a transfer is waiting
//   bit 3  check_done       the Checker has a result for the current checkpoint
//   bit 4  check_ok         that result is a match
//   bit 5  error            main FSM is in its Error state
//   bit 6  err_timeout      the error is a checkpoint timeout
//   bit 7  err_mismatch     the error is an element mismatch
//   bit 8  err_size         the error is an element-count mismatch
//   bits 11:9               main FSM state (lockstep_state_e)
package xlockstep_pkg;

  localparam int unsigned AXIL_AW = 32;
  localparam int unsigned AXIL_DW = 32;

  // Register offsets inside one bank (address bits 4:0).
  localparam logic [4:0] OFS_DATA    = 5'h00;
  localparam logic [4:0] OFS_CONTROL = 5'h04;
  localparam logic [4:0] OFS_TIMEOUT = 5'h08;
  localparam logic [4:0] OFS_STATUS  = 5'h1C;

  // CONTROL bit positions.
  localparam int unsigned CTRL_RTS = 0;
  localparam int unsigned CTRL_TX  = 1;
  localparam int unsigned CTRL_FIX = 2;

  // STATUS bit positions.
  localparam int unsigned ST_READY     = 0;
  localparam int unsigned ST_TX        = 1;
  localparam int unsigned ST_BUSY      = 2;
  localparam int unsigned ST_CHK_DONE  = 3;
  localparam int unsigned ST_CHK_OK    = 4;
  localparam int unsigned ST_ERROR     = 5;
  localparam int unsigned ST_ERR_TMO   = 6;
  localparam int unsigned ST_ERR_MISM  = 7;
  localparam int unsigned ST_ERR_SIZE  = 8;
  localparam int unsigned ST_STATE_LSB = 9;

  localparam logic [1:0] AXI_RESP_OKAY = 2'b00;

  // Main FSM states (five states of the accelerator).
  typedef enum logic [2:0] {
    LS_IDLE    = 3'd0,
    LS_SYNCHRO = 3'd1,
    LS_CHECKER = 3'd2,
    LS_RESUME  = 3'd3,
    LS_ERROR   = 3'd4
  } lockstep_state_e;

  // Synchro states.
  typedef enum logic [1:0] {
    SY_IDLE  = 2'd0,
    SY_READY = 2'd1,
    SY_SYNC  = 2'd2
  } synchro_state_e;

  // AXI4-Lite master-to-slave signals.
  typedef struct packed {
    logic [AXIL_AW-1:0]   awaddr;
    logic                 awvalid;
    logic [AXIL_DW-1:0]   wdata;
    logic [AXIL_DW/8-1:0] wstrb;
    logic                 wvalid;
    logic                 bready;
    logic [AXIL_AW-1:0]   araddr;
    logic                 arvalid;
    logic                 rready;
  } axil_req_t;

  // AXI4-Lite slave-to-master signals.
  typedef struct packed {
    logic               awready;
    logic               wready;
    logic [1:0]         bresp;
    logic               bvalid;
    logic               arready;
    logic [AXIL_DW-1:0] rdata;
    logic [1:0]         rresp;
    logic               rvalid;
  } axil_rsp_t;

endpackage
