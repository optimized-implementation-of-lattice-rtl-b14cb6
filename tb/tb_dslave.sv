// tb_dslave: one DSlave whose links are looped back onto itself (East output
// into West input, North into South), which makes its 5 x 5 block a periodic
// domain. Loads random near-equilibrium distributions through the host port,
// runs several time steps and compares every distribution value with the
// floating point reference. Also checks that each time step finishes within
// the 214 cycles (1712 ns at 125 MHz) of the overlapped scheme, that the
// interior collision overlaps the link transfers and that the sub-phase 2
// forwarding happens on every link in every step.
module tb_dslave;
  import lbm_pkg::*;
  import lbm_ref_pkg::*;

  localparam int N = 5, STEPS = 4, CYCLE_BUDGET = 214;
  localparam real OM = 1.2;

  logic        clk = 0, rst_n = 0, go = 0;
  fx_t         omega;
  logic [31:0] nsteps, step;
  logic        busy, done;
  logic        host_we = 0;
  logic [7:0]  host_site = 0;
  logic [3:0]  host_dir = 0;
  fx_t         host_wdata = 0, host_rdata;
  line_t       line_out [NLINK], line_in [NLINK];
  logic        stall, int_busy;
  logic [NLINK-1:0] retx, crc_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dslave #(.N(N)) dut (.*);

  assign line_in[LINK_W] = line_out[LINK_E];
  assign line_in[LINK_E] = line_out[LINK_W];
  assign line_in[LINK_S] = line_out[LINK_N];
  assign line_in[LINK_N] = line_out[LINK_S];

  // mechanism counters
  int n_overlap = 0, n_fwd = 0, n_stream = 0;
  always @(posedge clk) if (rst_n) begin
    if (int_busy && (line_out[0].valid || line_out[1].valid || line_out[2].valid || line_out[3].valid))
      n_overlap++;
    n_fwd += $countones(dut.send2);
    if (dut.stream) n_stream++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f [];
    int  t0, t1, per_step;
    f = new[N*N*Q];
    omega  = to_fx(OM);
    nsteps = STEPS;
    for (int s = 0; s < N*N; s++) random_site(f, s*Q);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < N*N; s++)
      for (int i = 0; i < Q; i++) begin
        host_we = 1; host_site = 8'(s); host_dir = 4'(i); host_wdata = to_fx(f[s*Q + i]);
        @(negedge clk);
      end
    host_we = 0;
    go = 1; @(negedge clk); go = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    t1 = $time;
    per_step = (t1 - t0) / 10 / STEPS;
    $display("cycles per time step: %0d", per_step);
    check(step == STEPS, "step count");
    check(per_step <= CYCLE_BUDGET, "time step within 214 cycles");
    check(n_stream == STEPS, "one streaming per step");
    check(n_fwd == 4 * STEPS, "sub-phase 2 forwarding on all links");
    check(n_overlap > 0, "interior collision overlaps transfers");
    for (int k = 0; k < STEPS; k++) lbm_ref_pkg::step(f, N, N, to_r(omega));
    for (int s = 0; s < N*N; s++)
      for (int i = 0; i < Q; i++) begin
        real got, dif;
        host_site = 8'(s); host_dir = 4'(i);
        #1;
        got = to_r(host_rdata);
        dif = got - f[s*Q + i];
        checks++;
        if (dif > 1.0e-5 || dif < -1.0e-5) begin
          failures++;
          if (failures < 10) $display("site %0d dir %0d: got %f expected %f", s, i, got, f[s*Q + i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
