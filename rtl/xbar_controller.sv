// xbar_controller: computes the crossbar settings of the DOMMU every cycle.
//
// Input is the translated access of every memory port channel: whether it is
// legal and the physical BRAM (PID) it targets. Channel A of every port is
// switched to side A of the BRAM elements and channel B to side B, so each
// BRAM side is a separate target of the non-blocking crossbar. For every
// BRAM side the controller selects the requesting channel; when two ports
// that share a page hit the same side of the same BRAM in one cycle, the lower
// port number wins and the other access is dropped and flagged as a
// collision. Side-to-channel binding and the collision rule are this design's
// choices; the description only names the block.
//
// It also registers, for the read crossbar, which BRAM each channel read in
// the previous cycle, and an error flag (illegal access or collision) that
// reaches the PE together with the read data, one cycle after the request.
//
// Access statistics: use_cnt[b] counts the accesses element b has served
// (both sides, saturating at all ones). It is held at zero while the element
// is free (free_map[b]), so it counts the use of the current allocation. The
// unit is described as tracking how often each BRAM is accessed; the counter
// width and where it lives are this design's choices.
module xbar_controller #(
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned N_BRAM  = 16,
  localparam int unsigned PW     = $clog2(N_PORTS),
  localparam int unsigned BW     = $clog2(N_BRAM)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tr_valid  [N_PORTS][2],
  input  logic [BW-1:0] tr_pid    [N_PORTS][2],
  input  logic          tr_illegal[N_PORTS][2],
  // write crossbar: which channel drives each BRAM side
  output logic          sel_en    [N_BRAM][2],
  output logic [PW-1:0] sel_port  [N_BRAM][2],
  // per channel
  output logic          grant     [N_PORTS][2],
  output logic          collision [N_PORTS][2],
  // read crossbar, registered (aligned with BRAM read data)
  output logic          rd_valid_q[N_PORTS][2],
  output logic [BW-1:0] rd_pid_q  [N_PORTS][2],
  output logic          err_q     [N_PORTS][2],
  // access statistics
  input  logic [N_BRAM-1:0] free_map,
  output logic [15:0]       use_cnt [N_BRAM]
);
  always_comb begin
    for (int b = 0; b < N_BRAM; b++) begin
      for (int c = 0; c < 2; c++) begin
        sel_en[b][c]   = 1'b0;
        sel_port[b][c] = '0;
        for (int p = N_PORTS - 1; p >= 0; p--) begin
          if (tr_valid[p][c] && 32'(tr_pid[p][c]) == b) begin
            sel_en[b][c]   = 1'b1;
            sel_port[b][c] = PW'(p);
          end
        end
      end
    end
    for (int p = 0; p < N_PORTS; p++) begin
      for (int c = 0; c < 2; c++) begin
        grant[p][c]     = tr_valid[p][c] && sel_port[tr_pid[p][c]][c] == PW'(p);
        collision[p][c] = tr_valid[p][c] && !grant[p][c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        for (int c = 0; c < 2; c++) begin
          rd_valid_q[p][c] <= 1'b0;
          rd_pid_q[p][c]   <= '0;
          err_q[p][c]      <= 1'b0;
        end
      end
    end else begin
      for (int p = 0; p < N_PORTS; p++) begin
        for (int c = 0; c < 2; c++) begin
          rd_valid_q[p][c] <= grant[p][c];
          rd_pid_q[p][c]   <= tr_pid[p][c];
          err_q[p][c]      <= tr_illegal[p][c] || collision[p][c];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < N_BRAM; b++) use_cnt[b] <= '0;
    end else begin
      for (int b = 0; b < N_BRAM; b++) begin
        if (free_map[b])
          use_cnt[b] <= '0;
        else if (use_cnt[b] <= 16'hFFFD)
          use_cnt[b] <= use_cnt[b] + 16'(sel_en[b][0]) + 16'(sel_en[b][1]);
        else if (sel_en[b][0] || sel_en[b][1])
          use_cnt[b] <= '1;
      end
    end
  end
endmodule
