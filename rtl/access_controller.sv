// access_controller: executes the control requests granted by the arbiter.
//
// It keeps the stock of BRAM elements: a free bit per physical element. A
// granted request is carried out as a sequence of single commands to the
// translator (BRAT), one element per command, each answered with ACK or NACK
// one cycle later:
//   ALLOC            take the first free element of the requested type, ADD
//                    it to the port's page; repeat `count` times. Stops early
//                    with NO_STOCK, or with the translator's NACK (page full,
//                    type mismatch); the elements already added stay.
//   ALLOC_SHARED     ATTACH the port to the page of `partner`.
//   DEALLOC_PAGE     DETACH the port if it shares another port's page,
//                    otherwise REMOVE elements until the page is empty.
//   DEALLOC_WORDS    REMOVE `count` elements (the port manager has turned the
//                    word count into elements).
// Every removed element returns to the stock. The response (status, elements
// granted or released, page size and type afterwards) goes back through the
// arbiter to the port manager. A request with n elements takes 3n+2 cycles
// from grant to response. The description only names this block; the
// one-element-per-command sequence and the first-free selection are this
// design's choices.
module access_controller
  import dommu_pkg::*;
#(
  parameter int unsigned N_PORTS   = 4,
  parameter int unsigned N_BRAM    = 16,
  parameter int unsigned MAX_BRAMS = 8,
  localparam int unsigned PW       = $clog2(N_PORTS),
  localparam int unsigned BW       = $clog2(N_BRAM),
  localparam int unsigned NW       = $clog2(MAX_BRAMS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from / to the arbiter
  output logic          ready,
  input  logic          req_valid,
  input  logic [PW-1:0] req_port,
  input  ctl_req_t      req,
  output logic          rsp_valid,
  output logic [PW-1:0] rsp_port,
  output ctl_rsp_t      rsp,
  // to / from the translator
  output logic          cmd_valid,
  output tr_cmd_e       cmd,
  output logic [PW-1:0] cmd_port,
  output logic [BW-1:0] cmd_pid,
  output btype_t        cmd_type,
  output cred_e         cmd_cred,
  output logic [PW-1:0] cmd_partner,
  input  logic          tr_rsp_valid,
  input  rsp_status_e   tr_rsp_status,
  input  logic [BW-1:0] tr_rsp_pid,
  output logic [PW-1:0] q_port,
  input  logic [NW-1:0] q_nbrams,
  input  btype_t        q_type,
  input  logic          q_shared,
  // stock of free elements
  output logic [N_BRAM-1:0] free_map
);
  typedef enum logic [2:0] {S_IDLE, S_STEP, S_WAIT, S_RESP} state_e;
  state_e           state;
  ctl_req_t         cur;
  logic [PW-1:0]    port;
  logic [CNT_W-1:0] done;
  rsp_status_e      status;
  tr_cmd_e          last_cmd;

  // first free element of the requested type
  logic          pick_ok;
  logic [BW-1:0] pick;
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int b = N_BRAM - 1; b >= 0; b--) begin
      if (free_map[b] && pid_type(b) == 32'(cur.btype)) begin
        pick_ok = 1'b1;
        pick    = BW'(b);
      end
    end
  end

  assign ready       = state == S_IDLE;
  assign q_port      = port;
  assign cmd_port    = port;
  assign cmd_type    = cur.btype;
  assign cmd_cred    = cur.cred;
  assign cmd_partner = PW'(cur.partner);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      port      <= '0;
      done      <= '0;
      status    <= RSP_ACK;
      last_cmd  <= TR_NOP;
      free_map  <= '1;
      cmd_valid <= 1'b0;
      cmd       <= TR_NOP;
      cmd_pid   <= '0;
      rsp_valid <= 1'b0;
      rsp_port  <= '0;
      rsp       <= '0;
    end else begin
      cmd_valid <= 1'b0;
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          cur    <= req;
          port   <= req_port;
          done   <= '0;
          status <= RSP_ACK;
          unique case (req.code)
            REQ_ALLOC: begin
              if (req.count == '0) begin status <= RSP_BAD_REQ; state <= S_RESP; end
              else state <= S_STEP;
            end
            REQ_ALLOC_SHARED: begin
              cmd_valid <= 1'b1; cmd <= TR_ATTACH; last_cmd <= TR_ATTACH;
              state <= S_WAIT;
            end
            REQ_DEALLOC_PAGE: begin
              cmd_valid <= 1'b1; cmd <= TR_DETACH; last_cmd <= TR_DETACH;
              state <= S_WAIT;
            end
            REQ_DEALLOC_WORDS: state <= S_STEP;
            default: begin status <= RSP_BAD_REQ; state <= S_RESP; end
          endcase
        end
        S_STEP: begin
          if (cur.code == REQ_ALLOC) begin
            if (done == cur.count) state <= S_RESP;
            else if (!pick_ok) begin status <= RSP_NO_STOCK; state <= S_RESP; end
            else begin
              cmd_valid <= 1'b1; cmd <= TR_ADD; last_cmd <= TR_ADD; cmd_pid <= pick;
              state <= S_WAIT;
            end
          end else begin
            // element removal for DEALLOC_WORDS and DEALLOC_PAGE
            if (cur.code == REQ_DEALLOC_WORDS && done == cur.count) state <= S_RESP;
            else begin
              cmd_valid <= 1'b1; cmd <= TR_REMOVE; last_cmd <= TR_REMOVE;
              state <= S_WAIT;
            end
          end
        end
        S_WAIT: if (tr_rsp_valid) begin
          unique case (last_cmd)
            TR_ADD: begin
              if (tr_rsp_status == RSP_ACK) begin
                free_map[cmd_pid] <= 1'b0;
                done  <= done + 1'b1;
                state <= S_STEP;
              end else begin
                status <= tr_rsp_status;
                state  <= S_RESP;
              end
            end
            TR_REMOVE: begin
              if (tr_rsp_status == RSP_ACK) begin
                free_map[tr_rsp_pid] <= 1'b1;
                done  <= done + 1'b1;
                state <= S_STEP;
              end else begin
                // an emptied page ends DEALLOC_PAGE successfully
                if (!(cur.code == REQ_DEALLOC_PAGE && tr_rsp_status == RSP_PAGE_EMPTY &&
                      done != '0))
                  status <= tr_rsp_status;
                state <= S_RESP;
              end
            end
            TR_DETACH: begin
              if (tr_rsp_status == RSP_ACK) state <= S_RESP;
              else state <= S_STEP;   // own page: release its elements
            end
            default: begin         // TR_ATTACH
              status <= tr_rsp_status;
              state  <= S_RESP;
            end
          endcase
        end
        default: begin             // S_RESP
          rsp_valid   <= 1'b1;
          rsp_port    <= port;
          rsp.status  <= status;
          rsp.count   <= done;
          rsp.nbrams  <= CNT_W'(q_nbrams);
          rsp.btype   <= q_type;
          rsp.shared  <= q_shared;
          state       <= S_IDLE;
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> ready)
    else $error("access_controller: request while busy");
endmodule
