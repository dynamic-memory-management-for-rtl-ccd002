// dommu_pkg: types and constants shared by the DOMMU (dynamic on-chip memory
// management unit) blocks.
//
// The unit hands out dual-port BRAM elements from a shared pool to the memory
// ports of processing elements (PEs). Each BRAM element has one of a few
// width x depth configurations ("types"). The request codes, access
// credentials (RD, WR, RD|WR) and ACK/NACK responses follow the description of
// the unit; their encodings, the three default BRAM types and all widths are
// this design's own choices.
package dommu_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W     = 32;  // widest BRAM word; access bus width
  localparam int unsigned NUM_TYPES  = 3;   // BRAM configurations in stock
  localparam int unsigned TYPE_IDX_W = 2;
  localparam int unsigned OFF_W      = 11;  // offset inside the deepest BRAM type
  localparam int unsigned WORDS_W    = 16;  // word-count field of a control request
  localparam int unsigned CNT_W      = 5;   // BRAM-count field of a control request

  typedef logic [TYPE_IDX_W-1:0] btype_t;

  // Three configurations of an 18 Kbit block RAM (16 Kbit of data each):
  // type 0 = 512 x 32, type 1 = 1024 x 16, type 2 = 2048 x 8.
  function automatic int unsigned type_width(input int unsigned t);
    case (t)
      0:       return 32;
      1:       return 16;
      default: return 8;
    endcase
  endfunction

  function automatic int unsigned type_depth_log2(input int unsigned t);
    case (t)
      0:       return 9;
      1:       return 10;
      default: return 11;
    endcase
  endfunction

  // Physical element b of the pool has configuration b mod NUM_TYPES.
  function automatic int unsigned pid_type(input int unsigned pid);
    return pid % NUM_TYPES;
  endfunction

  // ------------------------------------------------------ access credentials
  typedef enum logic [1:0] {
    CRED_NONE = 2'b00,
    CRED_RD   = 2'b01,
    CRED_WR   = 2'b10,
    CRED_RDWR = 2'b11
  } cred_e;

  // ---------------------------------------------------- scheduling priority
  typedef enum logic [1:0] {
    PRIO_LOW  = 2'd0,
    PRIO_MED  = 2'd1,
    PRIO_HIGH = 2'd2
  } prio_e;

  // ------------------------------------------- control requests of a PE port
  typedef enum logic [2:0] {
    REQ_NOP          = 3'd0,
    REQ_ALLOC        = 3'd1,  // allocate (or grow) the port's own page
    REQ_ALLOC_SHARED = 3'd2,  // attach to the page of another port (shared BRAM)
    REQ_DEALLOC_PAGE = 3'd3,  // release the whole page (or detach from a shared one)
    REQ_DEALLOC_WORDS= 3'd4,  // release a number of words from the page
    REQ_SET_PRIO     = 3'd5   // assign a new arbitration priority to the port
  } req_code_e;

  // Response status: ACK or one of the NACK reasons.
  typedef enum logic [2:0] {
    RSP_ACK        = 3'd0,
    RSP_NO_STOCK   = 3'd1,  // no free BRAM of the requested type
    RSP_PAGE_FULL  = 3'd2,  // page already holds the maximum number of BRAMs
    RSP_PAGE_EMPTY = 3'd3,  // nothing to deallocate
    RSP_TYPE_MISM  = 3'd4,  // page already holds BRAMs of another type
    RSP_BAD_REQ    = 3'd5   // malformed request (no fitting type, bad partner ...)
  } rsp_status_e;

  // Control request as passed from a port manager through the arbiter to the
  // access controller. `count` is a number of BRAM elements.
  typedef struct packed {
    req_code_e            code;
    btype_t               btype;
    logic [CNT_W-1:0]     count;
    logic [7:0]           partner;  // port whose page is shared (ALLOC_SHARED)
    cred_e                cred;
  } ctl_req_t;

  // Response of the access controller, routed back to one port manager.
  typedef struct packed {
    rsp_status_e          status;
    logic [CNT_W-1:0]     count;    // BRAM elements granted / released
    logic [CNT_W-1:0]     nbrams;   // BRAM elements now in the port's page
    btype_t               btype;    // type of the page
    logic                 shared;   // port is attached to another port's page
  } ctl_rsp_t;

  // Commands from the access controller to the translator (BRAT).
  typedef enum logic [2:0] {
    TR_NOP    = 3'd0,
    TR_ADD    = 3'd1,  // append a physical BRAM to the port's page
    TR_REMOVE = 3'd2,  // remove the last BRAM of the port's page, return its PID
    TR_ATTACH = 3'd3,  // map the port onto the page of `partner`
    TR_DETACH = 3'd4   // map an attached port back onto its own (empty) page
  } tr_cmd_e;

endpackage
