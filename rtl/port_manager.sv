// port_manager: the control side of one DOMMU memory port.
//
// A PE sends control requests here (valid/ready handshake on ctl_*):
// allocate a page or grow it (ALLOC: word width and number of words),
// share another port's page (ALLOC_SHARED: partner port and credentials),
// release the page (DEALLOC_PAGE) or a number of words (DEALLOC_WORDS), and
// set the port's arbitration priority (SET_PRIO). Every request is answered
// by one pe_rsp_valid pulse carrying ACK or a NACK reason and the page's size
// and type afterwards.
//
// Matching: an ALLOC names a word width and a number of words. Among the BRAM
// types at least as wide as requested, the one needing the fewest elements
// (ceil(words / depth)) is taken; ties go to the narrower type. When the port
// already owns a page, the page's type is kept if it is wide enough. A PE may
// instead name the BRAM type itself (ctl_type_fix with ctl_btype): that type
// is then used as it is, if it exists and is wide enough (else BAD_REQ), and
// a page of another type is refused by the translator with TYPE_MISM.
// DEALLOC_WORDS releases floor(words / depth) elements, so no word the PE
// still asked to keep is lost.
//
// Automatic (de)allocation, enabled per port at run time by auto_en: the
// manager counts writes on both channels (each write is taken to be a new
// address) and asks for one more element of the page's type when the free
// space left, capacity - writes, falls to cfg_wr_headroom words or less. It
// counts cycles without any access and releases one element when that count
// exceeds cfg_idle_thresh. Both are sent as ordinary requests through the
// arbiter and reported to the PE with pe_rsp_auto set. An automatic
// allocation is only asked for after a write, so a failed one is not retried
// before the next write and a release never triggers one.
//
// Requests to the arbiter are held (req_valid) until req_grant; the manager
// then waits for the routed response. SET_PRIO and malformed requests are
// answered by the manager itself one cycle later. The request set follows the
// unit's description; the fields, encodings and the matching tie rule are this
// design's choices.
module port_manager
  import dommu_pkg::*;
#(
  parameter int unsigned N_PORTS   = 4,
  parameter int unsigned MAX_BRAMS = 8   // allowed maximum size of this port's page
) (
  input  logic             clk,
  input  logic             rst_n,
  // PE control port
  input  logic             ctl_valid,
  output logic             ctl_ready,
  input  req_code_e        ctl_code,
  input  logic [5:0]       ctl_width,
  input  logic             ctl_type_fix,   // use ctl_btype instead of matching
  input  btype_t           ctl_btype,
  input  logic [WORDS_W-1:0] ctl_words,
  input  logic [7:0]       ctl_partner,
  input  cred_e            ctl_cred,
  input  prio_e            ctl_prio,
  input  logic             ctl_prio_dyn,
  output logic             pe_rsp_valid,
  output ctl_rsp_t         pe_rsp,
  output logic             pe_rsp_auto,
  // automatic (de)allocation
  input  logic             auto_en,
  input  logic [15:0]      cfg_wr_headroom,
  input  logic [15:0]      cfg_idle_thresh,
  input  logic             acc_en [2],
  input  logic             acc_we [2],
  // arbiter
  output logic             req_valid,
  output ctl_req_t         req,
  input  logic             req_grant,
  output logic             prio_wr,
  output prio_e            prio_level,
  output logic             prio_dyn,
  input  logic             rsp_valid,
  input  ctl_rsp_t         rsp
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RSP, S_LOCAL} state_e;
  state_e state;

  // page as last reported by the access controller
  logic [CNT_W-1:0] pg_n;
  btype_t           pg_type;
  logic             pg_shared;
  logic             is_auto;
  logic             alloc_armed;  // a write since the last automatic allocation
  logic [16:0]      wr_cnt;
  logic [15:0]      idle_cnt;
  ctl_rsp_t         local_rsp;

  // ------------------------------------------------------------ matching
  logic             fit_ok;
  btype_t           fit_type;
  logic [CNT_W-1:0] fit_cnt;
  always_comb begin
    logic [16:0] best, n;
    fit_ok   = 1'b0;
    fit_type = '0;
    best     = '1;
    for (int t = NUM_TYPES - 1; t >= 0; t--) begin
      n = (17'(ctl_words) + 17'((1 << type_depth_log2(t)) - 1)) >> type_depth_log2(t);
      if (32'(ctl_width) <= type_width(t) && n < best) begin
        fit_ok   = 1'b1;
        fit_type = btype_t'(t);
        best     = n;
      end
    end
    // keep the type of an existing page when it is wide enough
    if (pg_n != '0 && !pg_shared && 32'(ctl_width) <= type_width(32'(pg_type))) begin
      fit_type = pg_type;
      best = (17'(ctl_words) + 17'((1 << type_depth_log2(32'(pg_type))) - 1)) >>
             type_depth_log2(32'(pg_type));
    end
    // a type named by the PE overrides the match
    if (ctl_type_fix) begin
      fit_type = ctl_btype;
      fit_ok   = 32'(ctl_btype) < NUM_TYPES &&
                 32'(ctl_width) <= type_width(32'(ctl_btype));
      best = (17'(ctl_words) + 17'((1 << type_depth_log2(32'(ctl_btype))) - 1)) >>
             type_depth_log2(32'(ctl_btype));
    end
    fit_cnt = (best > 17'((1 << CNT_W) - 1)) ? '1 : CNT_W'(best);
    if (ctl_width == '0 || ctl_words == '0) fit_ok = 1'b0;
  end

  logic [16:0] capacity;
  logic [16:0] rel_cnt;
  assign capacity = 17'(pg_n) << type_depth_log2(32'(pg_type));
  assign rel_cnt  = 17'(ctl_words) >> type_depth_log2(32'(pg_type));

  logic auto_owner, want_alloc, want_dealloc;
  assign auto_owner   = auto_en && pg_n != '0 && !pg_shared;
  assign want_alloc   = auto_owner && alloc_armed && 32'(pg_n) < MAX_BRAMS &&
                        capacity <= wr_cnt + 17'(cfg_wr_headroom);
  assign want_dealloc = auto_owner && idle_cnt > cfg_idle_thresh;

  assign ctl_ready = state == S_IDLE;
  assign req_valid = state == S_REQ;

  logic [1:0] n_wr;
  logic       any_acc;
  assign n_wr    = 2'(acc_en[0] && acc_we[0]) + 2'(acc_en[1] && acc_we[1]);
  assign any_acc = acc_en[0] || acc_en[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      req          <= '0;
      prio_wr      <= 1'b0;
      prio_level   <= PRIO_MED;
      prio_dyn     <= 1'b0;
      pe_rsp_valid <= 1'b0;
      pe_rsp       <= '0;
      pe_rsp_auto  <= 1'b0;
      pg_n         <= '0;
      pg_type      <= '0;
      pg_shared    <= 1'b0;
      is_auto      <= 1'b0;
      alloc_armed  <= 1'b0;
      wr_cnt       <= '0;
      idle_cnt     <= '0;
      local_rsp    <= '0;
    end else begin
      prio_wr      <= 1'b0;
      pe_rsp_valid <= 1'b0;
      pe_rsp_auto  <= 1'b0;

      // access monitoring
      if (n_wr != '0) begin
        alloc_armed <= 1'b1;
        if (wr_cnt < capacity) wr_cnt <= wr_cnt + 17'(n_wr);
      end
      if (any_acc || state != S_IDLE) idle_cnt <= '0;
      else if (idle_cnt != '1) idle_cnt <= idle_cnt + 1'b1;

      unique case (state)
        S_IDLE: begin
          local_rsp        <= '0;
          local_rsp.nbrams <= pg_n;
          local_rsp.btype  <= pg_type;
          local_rsp.shared <= pg_shared;
          if (ctl_valid) begin
            is_auto     <= 1'b0;
            req.code    <= ctl_code;
            req.btype   <= fit_type;
            req.count   <= fit_cnt;
            req.partner <= ctl_partner;
            req.cred    <= ctl_cred;
            state       <= S_REQ;
            unique case (ctl_code)
              REQ_ALLOC: if (!fit_ok) begin
                local_rsp.status <= RSP_BAD_REQ;
                state <= S_LOCAL;
              end
              REQ_ALLOC_SHARED: if (32'(ctl_partner) >= N_PORTS) begin
                local_rsp.status <= RSP_BAD_REQ;
                state <= S_LOCAL;
              end
              REQ_DEALLOC_PAGE: ;
              REQ_DEALLOC_WORDS:
                req.count <= (rel_cnt > 17'((1 << CNT_W) - 1)) ? '1 : CNT_W'(rel_cnt);
              REQ_SET_PRIO: begin
                prio_wr    <= 1'b1;
                prio_level <= ctl_prio;
                prio_dyn   <= ctl_prio_dyn;
                local_rsp.status <= RSP_ACK;
                state <= S_LOCAL;
              end
              default: begin
                local_rsp.status <= RSP_BAD_REQ;
                state <= S_LOCAL;
              end
            endcase
          end else if (want_alloc || want_dealloc) begin
            is_auto     <= 1'b1;
            if (want_alloc) alloc_armed <= 1'b0;
            req.code    <= want_alloc ? REQ_ALLOC : REQ_DEALLOC_WORDS;
            req.btype   <= pg_type;
            req.count   <= CNT_W'(1);
            req.partner <= '0;
            req.cred    <= CRED_RDWR;
            state       <= S_REQ;
          end
        end
        S_REQ: if (req_grant) state <= S_RSP;
        S_RSP: if (rsp_valid) begin
          pg_n         <= rsp.nbrams;
          pg_type      <= rsp.btype;
          pg_shared    <= rsp.shared;
          pe_rsp_valid <= 1'b1;
          pe_rsp       <= rsp;
          pe_rsp_auto  <= is_auto;
          if (req.code == REQ_DEALLOC_WORDS || req.code == REQ_DEALLOC_PAGE)
            alloc_armed <= 1'b0;
          // no more writes than the page now holds words
          if (wr_cnt > (17'(rsp.nbrams) << type_depth_log2(32'(rsp.btype))))
            wr_cnt <= 17'(rsp.nbrams) << type_depth_log2(32'(rsp.btype));
          state <= S_IDLE;
        end
        default: begin  // S_LOCAL
          pe_rsp_valid <= 1'b1;
          pe_rsp       <= local_rsp;
          state        <= S_IDLE;
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_grant |=> req_valid && $stable(req))
    else $error("port_manager: request dropped before grant");
endmodule
