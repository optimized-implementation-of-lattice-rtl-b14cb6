// dslave: one DSlave FPGA of the lattice Boltzmann machine in its 2D
// configuration. It holds an N x N block of D2Q9 lattice sites (N = 5) and
// computes them with 4(N-1) = 16 physical computational nodes: every node owns
// one site of the block's border, and 9 of them also own one interior site.
// Per time step the nodes first collide the 16 border sites, whose outgoing
// values are then sent to the four neighbouring FPGAs while 9 nodes collide
// the interior; after the exchange the whole block streams in one cycle.
//
// Storage: f_q holds the post-streaming distributions of the N x N sites.
// ext_q is an (N+2) x (N+2) grid of post-collision values: the inner N x N
// are written by the collision units, the surrounding ghost ring by packets
// from the neighbours. Streaming copies f(r,c,i) <= ext(r-dr_i, c-dc_i, i).
//
// Exchange: in sub-phase 1 each link carries 3N-1 words (lbm_pkg::tx_word):
// the axis value and both diagonals of the border on that side, minus one
// corner diagonal that goes on the next link counter-clockwise. The neighbour
// that receives such a corner value forwards it in sub-phase 2, one word per
// link (lbm_pkg::fwd_word), to the FPGA diagonally beyond.
//
// Follows the design: the 5 x 5 block on 16 nodes, the node-to-site mapping
// (border sites numbered clockwise from the top-left corner, interior sites
// row by row on nodes 1..8 and 11), the overlap of interior collision with
// the transfers, the 3N-1 + 1 word sub-phases and the single-cycle streaming.
// This implementation's own: the word order in the packets, the fixed point
// number format (see collision_unit), the host port and the periodic use in
// dslave_grid. Every site uses the bulk collision; boundary operators are not
// included.
//
// Host port (stands for the board manager's access): host_we writes word
// host_wdata to direction host_dir of site host_site; host_rdata reads the
// same word combinationally. Use it only while busy is low. go/nsteps/done as
// in cycle_ctrl. Lines: line_out[l]/line_in[l] for l = E, N, W, S.
module dslave
  import lbm_pkg::*;
#(
  parameter int N       = 5,     // lattice sites per side of the block
  parameter int TIMEOUT = 1024   // link acknowledgement timeout, cycles
) (
  input  logic        clk,
  input  logic        rst_n,
  input  fx_t         omega,
  input  logic        go,
  input  logic [31:0] nsteps,
  output logic        busy,
  output logic        done,
  output logic [31:0] step,
  // host access to the site state
  input  logic        host_we,
  input  logic [7:0]  host_site,
  input  logic [3:0]  host_dir,
  input  fx_t         host_wdata,
  output fx_t         host_rdata,
  // links E, N, W, S
  output line_t       line_out [NLINK],
  input  line_t       line_in  [NLINK],
  // status
  output logic        stall,
  output logic        int_busy,
  output logic [NLINK-1:0] retx,
  output logic [NLINK-1:0] crc_err
);

  localparam int NP   = 4 * (N - 1);       // physical nodes = border sites
  localparam int NI   = (N - 2) * (N - 2); // interior sites
  localparam int NS   = N * N;
  localparam int NE   = (N + 2) * (N + 2);
  localparam int W1   = 3 * N - 1;         // words in sub-phase 1
  localparam int MAXW = W1;

  if (NI > NP) begin : g_bad_n
    $error("dslave: more interior sites than physical nodes");
  end

  // ---- mapping of physical nodes to lattice sites -------------------------
  // border site of node p, clockwise from the top-left corner
  function automatic int periph_site(input int p);
    int r, c;
    if (p < N)              begin r = 0;               c = p;               end
    else if (p < 2*N - 1)   begin r = p - (N - 1);     c = N - 1;           end
    else if (p < 3*N - 2)   begin r = N - 1;           c = (3*N - 3) - p;   end
    else                    begin r = (4*N - 4) - p;   c = 0;               end
    return r * N + c;
  endfunction

  // node computing interior site k (row by row); for N = 5 the ninth
  // interior site is computed by node 11, the others by nodes 1..8
  function automatic int int_node(input int k);
    return (N == 5 && k == 8) ? 10 : k;
  endfunction

  function automatic int int_site(input int k);
    return (k / (N - 2) + 1) * N + (k % (N - 2) + 1);
  endfunction

  // interior site of node p, or -1
  function automatic int node_int_site(input int p);
    int s;
    s = -1;
    for (int k = 0; k < NI; k++)
      if (int_node(k) == p) s = int_site(k);
    return s;
  endfunction

  function automatic int ext_idx(input int r, input int c);
    return (r + 1) * (N + 2) + (c + 1);
  endfunction

  function automatic int ext_of_site(input int s);
    return ext_idx(s / N, s % N);
  endfunction

  function automatic int ext_of_ref(input wref_t w);
    return ext_idx(int'(w.r), int'(w.c));
  endfunction

  // ---- state --------------------------------------------------------------
  fvec_t f_q   [NS];
  fvec_t ext_q [NE];

  // ---- control ------------------------------------------------------------
  logic            start_periph, start_int, periph_done, int_done, stream;
  logic [NLINK-1:0] tx_ready, pkt_ready, send1, send2, take, take_sp2;

  cycle_ctrl #(.NL(NLINK)) u_ctrl (
    .clk, .rst_n, .go, .nsteps, .busy, .done, .step,
    .start_periph, .start_int, .periph_done, .int_done,
    .tx_ready, .pkt_ready, .send1, .send2, .take, .take_sp2,
    .stream, .stall
  );

  // ---- computational nodes ------------------------------------------------
  logic          phase_int_q;           // current node job is the interior one
  logic          sel_int;               // input select, valid in the start cycle too
  logic [NP-1:0] u_start, u_done, u_busy;
  fvec_t         u_in  [NP];
  fvec_t         u_out [NP];

  assign sel_int = start_int | (phase_int_q & ~start_periph);

  for (genvar p = 0; p < NP; p++) begin : g_node
    localparam int PS = periph_site(p);
    localparam int IS = node_int_site(p);
    if (IS >= 0) begin : g_two
      assign u_in[p]    = sel_int ? f_q[IS] : f_q[PS];
      assign u_start[p] = start_periph | start_int;
    end else begin : g_one
      assign u_in[p]    = f_q[PS];
      assign u_start[p] = start_periph;
    end
    collision_unit u_coll (
      .clk, .rst_n,
      .start(u_start[p]), .omega,
      .f_in(u_in[p]), .f_out(u_out[p]),
      .busy(u_busy[p]), .done(u_done[p])
    );
  end

  // all units run with the same latency, so their done pulses coincide
  assign periph_done = !phase_int_q && u_done[0];
  assign int_done    =  phase_int_q && u_done[int_node(0)];
  assign int_busy    =  phase_int_q && u_busy[int_node(0)];

  // ---- transceivers -------------------------------------------------------
  fx_t        tx_data [NLINK][MAXW];
  fx_t        rx_data [NLINK][MAXW];
  logic [7:0] rx_len  [NLINK];
  logic       rx_tag  [NLINK];
  logic       tx_sp2  [NLINK];

  for (genvar l = 0; l < NLINK; l++) begin : g_link
    always_comb begin
      tx_sp2[l] = !send1[l];
      for (int k = 0; k < MAXW; k++) begin
        wref_t w;
        if (send1[l] || k >= 1) w = tx_word(N, l, k);
        else                    w = fwd_word(N, l);
        tx_data[l][k] = ext_q[ext_of_ref(w)][w.d];
      end
    end

    link_transceiver #(.MAXW(MAXW), .TIMEOUT(TIMEOUT)) u_xcvr (
      .clk, .rst_n,
      .send(send1[l] | send2[l]),
      .send_tag(tx_sp2[l]),
      .send_len(send1[l] ? 8'(W1) : 8'd1),
      .send_data(tx_data[l]),
      .tx_ready(tx_ready[l]),
      .pkt_ready(pkt_ready[l]),
      .pkt_tag(rx_tag[l]),
      .pkt_len(rx_len[l]),
      .pkt_data(rx_data[l]),
      .pkt_take(take[l]),
      .line_out(line_out[l]),
      .line_in(line_in[l]),
      .retx(retx[l]),
      .crc_err(crc_err[l])
    );
  end

  // ---- host read ----------------------------------------------------------
  always_comb begin
    host_rdata = '0;
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < Q; i++)
        if (host_site == 8'(s) && host_dir == 4'(i)) host_rdata = f_q[s][i];
  end

  // ---- state update -------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q         <= '{default: '0};
      ext_q       <= '{default: '0};
      phase_int_q <= 1'b0;
    end else begin
      if (start_periph) phase_int_q <= 1'b0;
      if (start_int)    phase_int_q <= 1'b1;

      // collision results
      for (int p = 0; p < NP; p++) begin
        if (u_done[p]) begin
          if (phase_int_q) begin
            if (node_int_site(p) >= 0) ext_q[ext_of_site(node_int_site(p))] <= u_out[p];
          end else begin
            ext_q[ext_of_site(periph_site(p))] <= u_out[p];
          end
        end
      end

      // packets from the neighbours; the sender used the opposite link
      for (int l = 0; l < NLINK; l++) begin
        if (take[l]) begin
          if (take_sp2[l]) begin
            wref_t w;
            w = rx_place(N, (l + 2) % NLINK, fwd_word(N, (l + 2) % NLINK));
            ext_q[ext_of_ref(w)][w.d] <= rx_data[l][0];
          end else begin
            for (int k = 0; k < W1; k++) begin
              wref_t w;
              w = rx_place(N, (l + 2) % NLINK, tx_word(N, (l + 2) % NLINK, k));
              ext_q[ext_of_ref(w)][w.d] <= rx_data[l][k];
            end
          end
        end
      end

      // streaming
      if (stream) begin
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++)
            for (int i = 0; i < Q; i++)
              f_q[r*N + c][i] <= ext_q[ext_idx(r - DR[i], c - DC[i])][i];
      end

      // host writes
      if (host_we) begin
        for (int s = 0; s < NS; s++)
          for (int i = 0; i < Q; i++)
            if (host_site == 8'(s) && host_dir == 4'(i)) f_q[s][i] <= host_wdata;
      end
    end
  end

  // a received packet must be of the kind the controller expects
  for (genvar l = 0; l < NLINK; l++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     take[l] |-> (rx_tag[l] == take_sp2[l]) &&
                                 (rx_len[l] == (take_sp2[l] ? 8'd1 : 8'(W1))));
  end

endmodule
