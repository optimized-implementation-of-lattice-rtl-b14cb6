// tb_dslave_grid: end-to-end test of the DSlave matrix at its default size
// (2 x 2 DSlaves of 5 x 5 sites, a periodic 10 x 10 domain). Random
// near-equilibrium distributions are loaded through the host port, the
// matrix runs time steps and every value is compared with the floating point
// reference. The run has three parts: a clean one, one in which single-byte
// bit errors are injected at random on random links, and one in which every
// ACK packet on one line is corrupted. Counted mechanisms, each
// of which must occur: interior collision overlapping link traffic, sub-phase 2
// diagonal forwarding, CRC errors detected, retransmissions, and sub-phase 1
// packets stalled waiting for an acknowledgement. The clean steps must each
// finish within 214 cycles (1712 ns at 125 MHz).
module tb_dslave_grid;
  import lbm_pkg::*;
  import lbm_ref_pkg::*;

  localparam int GX = 2, GY = 2, N = 5;
  localparam int WD = GX * N, HT = GY * N;
  localparam int STEPS1 = 3, STEPS2 = 8, STEPS3 = 2, CYCLE_BUDGET = 214;
  localparam real OM = 1.5;

  logic        clk = 0, rst_n = 0, go = 0;
  fx_t         omega;
  logic [31:0] nsteps;
  logic        busy, done;
  logic [7:0]  host_sel = 0;
  logic        host_we = 0;
  logic [7:0]  host_site = 0;
  logic [3:0]  host_dir = 0;
  fx_t         host_wdata = 0, host_rdata;
  logic [7:0]  err_mask [GX*GY][NLINK];
  logic        stall, int_busy, retx, crc_err;
  int checks = 0, failures = 0;
  bit inject = 0;

  always #5 clk = ~clk;

  dslave_grid dut (.*);

  // mechanism counters
  int n_overlap = 0, n_fwd = 0, n_retx = 0, n_crc = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    bit any_line;
    any_line = 0;
    for (int d = 0; d < GX*GY; d++)
      for (int l = 0; l < NLINK; l++)
        if (dut.lo[d][l].valid) any_line = 1;
    if (int_busy && any_line) n_overlap++;
    n_fwd += $countones(dut.g_y[0].g_x[0].u_dslave.send2);
    if (retx)    n_retx++;
    if (crc_err) n_crc++;
    if (stall)   n_stall++;
  end

  // random single-byte errors (inject), or (kill_ack) one ACK packet from
  // DSlave 0 to its East neighbour corrupted, after that neighbour has sent
  // its sub-phase 2 packet: its next sub-phase 1 packet must then wait for the
  // timeout and the retransmission
  bit kill_ack = 0, prev_valid = 0;
  int kills = 0;
  always @(negedge clk) begin
    foreach (err_mask[d, l]) err_mask[d][l] = 8'h00;
    if (inject && $urandom_range(19) == 0)
      err_mask[$urandom_range(GX*GY-1)][$urandom_range(NLINK-1)] = 8'(1 << $urandom_range(7));
    if (kill_ack && kills == 0 && dut.g_y[0].g_x[1].u_dslave.u_ctrl.sent2_q[LINK_W] &&
        dut.lo[0][LINK_E].valid && !prev_valid && dut.lo[0][LINK_E].data[7:6] == PK_ACK) begin
      err_mask[1][LINK_W] = 8'h01;
      kills++;
    end
    prev_valid = dut.lo[0][LINK_E].valid;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int dsel(int r, int c); return (r / N) * GX + (c / N); endfunction
  function automatic int lsite(int r, int c); return (r % N) * N + (c % N); endfunction

  task automatic run(input int steps, output int cycles);
    int t0;
    nsteps = steps;
    go = 1; @(negedge clk); go = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    cycles = ($time - t0) / 10;
  endtask

  task automatic compare(ref real f [], input string what);
    int bad;
    bad = 0;
    for (int r = 0; r < HT; r++)
      for (int c = 0; c < WD; c++)
        for (int i = 0; i < Q; i++) begin
          real got, dif;
          host_sel = 8'(dsel(r, c)); host_site = 8'(lsite(r, c)); host_dir = 4'(i);
          #1;
          got = to_r(host_rdata);
          dif = got - f[(r*WD + c)*Q + i];
          checks++;
          if (dif > 2.0e-5 || dif < -2.0e-5) begin
            failures++; bad++;
            if (bad < 6) $display("%s: (%0d,%0d) dir %0d got %f expected %f", what, r, c, i, got, f[(r*WD + c)*Q + i]);
          end
        end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f [];
    int  cyc;
    f = new[WD*HT*Q];
    omega  = to_fx(OM);
    nsteps = 0;
    foreach (err_mask[d, l]) err_mask[d][l] = 8'h00;
    for (int s = 0; s < WD*HT; s++) random_site(f, s*Q);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < HT; r++)
      for (int c = 0; c < WD; c++)
        for (int i = 0; i < Q; i++) begin
          host_we = 1; host_sel = 8'(dsel(r, c)); host_site = 8'(lsite(r, c)); host_dir = 4'(i);
          host_wdata = to_fx(f[(r*WD + c)*Q + i]);
          @(negedge clk);
        end
    host_we = 0;

    // clean run
    run(STEPS1, cyc);
    $display("clean run: %0d cycles for %0d steps", cyc, STEPS1);
    check(cyc <= CYCLE_BUDGET * STEPS1 + 4, "clean steps within 214 cycles each");
    check(n_retx == 0 && n_crc == 0, "no retransmission without errors");
    for (int k = 0; k < STEPS1; k++) lbm_ref_pkg::step(f, WD, HT, to_r(omega));
    compare(f, "clean");

    // run with injected transmission errors
    inject = 1;
    run(STEPS2, cyc);
    inject = 0;
    $display("noisy run: %0d cycles for %0d steps", cyc, STEPS2);
    for (int k = 0; k < STEPS2; k++) lbm_ref_pkg::step(f, WD, HT, to_r(omega));
    compare(f, "noisy");

    // run with lost acknowledgements
    kill_ack = 1;
    run(STEPS3, cyc);
    kill_ack = 0;
    $display("lost-ACK run: %0d cycles for %0d steps", cyc, STEPS3);
    for (int k = 0; k < STEPS3; k++) lbm_ref_pkg::step(f, WD, HT, to_r(omega));
    compare(f, "lost-ACK");

    $display("overlap cycles %0d, forwards %0d, crc errors %0d, retransmissions %0d, stall cycles %0d",
             n_overlap, n_fwd, n_crc, n_retx, n_stall);
    check(n_overlap > 0, "interior collision overlapped link traffic");
    check(n_fwd == 4 * (STEPS1 + STEPS2 + STEPS3), "sub-phase 2 forwarding every step on every link");
    check(n_crc > 0, "CRC errors detected");
    check(n_retx > 0, "packets retransmitted");
    check(n_stall > 0, "sub-phase 1 stalled on a missing acknowledgement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
