// cycle_ctrl: control circuit of a DSlave. It runs the lattice Boltzmann
// computation cycle of the overlapped scheme, one time step after another:
//
//   1. all physical nodes collide their peripheral (border) lattice site;
//   2. sub-phase 1: the border values go out on all four links, and at the
//      same time the nodes that also own an interior site collide it;
//   3. sub-phase 2: once the packet from the link clockwise before a link has
//      arrived, the one diagonal value it carried for the FPGA beyond is
//      forwarded on that link;
//   4. when both packets of every link have arrived, all sub-phase 2 packets
//      are out and the interior is done, the whole block streams in one
//      cycle and the next step starts.
//
// The order of the phases, the overlap of interior collision with the
// transfers, the two sub-phases and the rule that the next step does not wait
// for acknowledgements (only a new packet on a link waits until the previous
// one on that link is acknowledged) follow the design. The handshakes are
// this implementation's own: packets are taken as soon as they arrive (the
// first of a step is sub-phase 1, the second sub-phase 2; links keep order).
//
// Interface: go starts nsteps time steps (ignored while busy); done pulses
// when they are finished. periph_done / int_done are the collision units'
// done pulses. tx_ready, pkt_ready per link come from the transceivers;
// send1/send2/take are one-cycle pulses to them. stall is high while a
// sub-phase 1 packet waits for the previous acknowledgement.
module cycle_ctrl #(
  parameter int NL = 4   // links (E, N, W, S)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic [31:0]   nsteps,
  output logic          busy,
  output logic          done,
  output logic [31:0]   step,
  // collision units
  output logic          start_periph,
  output logic          start_int,
  input  logic          periph_done,
  input  logic          int_done,
  // transceivers
  input  logic [NL-1:0] tx_ready,
  input  logic [NL-1:0] pkt_ready,
  output logic [NL-1:0] send1,
  output logic [NL-1:0] send2,
  output logic [NL-1:0] take,
  output logic [NL-1:0] take_sp2,   // qualifies take: packet is sub-phase 2
  // streaming
  output logic          stream,
  output logic          stall
);

  typedef enum logic [2:0] {C_IDLE, C_PERIPH, C_XCHG, C_STREAM, C_DONE} cstate_e;
  cstate_e state;

  logic [NL-1:0] sent1_q, sent2_q, got1_q, got2_q;
  logic          int_fin_q;
  logic [31:0]   nsteps_q;

  // the word forwarded on link l arrived on the link clockwise before it
  function automatic int src_link(input int l);
    return (l + 1) % NL;
  endfunction

  always_comb begin
    send1    = '0;
    send2    = '0;
    take     = '0;
    take_sp2 = '0;
    stall    = 1'b0;
    if (state == C_XCHG) begin
      for (int l = 0; l < NL; l++) begin
        if (!sent1_q[l]) begin
          if (tx_ready[l]) send1[l] = 1'b1;
          else             stall    = 1'b1;
        end
        if (sent1_q[l] && !sent2_q[l] && tx_ready[l] && got1_q[src_link(l)])
          send2[l] = 1'b1;
        if (pkt_ready[l] && !got2_q[l]) begin
          take[l]     = 1'b1;
          take_sp2[l] = got1_q[l];
        end
      end
    end
  end

  assign busy = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_IDLE;
      sent1_q      <= '0;
      sent2_q      <= '0;
      got1_q       <= '0;
      got2_q       <= '0;
      int_fin_q    <= 1'b0;
      nsteps_q     <= '0;
      step         <= '0;
      start_periph <= 1'b0;
      start_int    <= 1'b0;
      stream       <= 1'b0;
      done         <= 1'b0;
    end else begin
      start_periph <= 1'b0;
      start_int    <= 1'b0;
      stream       <= 1'b0;
      done         <= 1'b0;
      unique case (state)
        C_IDLE: if (go && nsteps != 0) begin
          nsteps_q     <= nsteps;
          step         <= '0;
          start_periph <= 1'b1;
          state        <= C_PERIPH;
        end
        C_PERIPH: if (periph_done) begin
          sent1_q   <= '0;
          sent2_q   <= '0;
          got1_q    <= '0;
          got2_q    <= '0;
          int_fin_q <= 1'b0;
          start_int <= 1'b1;
          state     <= C_XCHG;
        end
        C_XCHG: begin
          sent1_q <= sent1_q | send1;
          sent2_q <= sent2_q | send2;
          got1_q  <= got1_q | (take & ~take_sp2);
          got2_q  <= got2_q | (take & take_sp2);
          if (int_done) int_fin_q <= 1'b1;
          if (&got2_q && &sent2_q && int_fin_q) begin
            stream <= 1'b1;
            state  <= C_STREAM;
          end
        end
        C_STREAM: begin
          step <= step + 1;
          if (step + 1 == nsteps_q) begin
            state <= C_DONE;
          end else begin
            start_periph <= 1'b1;
            state        <= C_PERIPH;
          end
        end
        C_DONE: begin
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
