// dslave_grid: a GX x GY matrix of DSlave FPGAs joined into one 2D lattice
// Boltzmann domain of (GX*N) x (GY*N) sites. Each DSlave talks only to its
// four neighbours; the diagonal neighbours are reached through the sub-phase 2
// forwarding inside each DSlave. The matrix wraps around at its edges (a
// torus), so the domain is periodic. There is no global synchronisation
// beyond the common go pulse: each DSlave advances when its neighbours' data
// has arrived.
//
// Follows the design: DSlaves as nodes of a 2D grid with one link per
// direction, the 2 x 2 matrix used as the default size. This implementation's
// own: the periodic wrap (the design's domain edges use boundary collision
// operators, which are not included), and the host port with a DSlave
// select, which stands for the board managers.
//
// Each link passes through an XOR mask (err_mask) that flips bits of the
// bytes arriving at a DSlave; it stands for the serial line and cable and
// lets a test inject transmission errors, which the links detect by CRC and
// repair by retransmission.
//
// Interface: go with nsteps starts every DSlave; done pulses once all have
// finished. host_sel picks the DSlave (x + GX*y) for host_we / host_rdata.
// stall, retx and crc_err are the OR over the matrix of the DSlave status.
module dslave_grid
  import lbm_pkg::*;
#(
  parameter int GX      = 2,
  parameter int GY      = 2,
  parameter int N       = 5,
  parameter int TIMEOUT = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  fx_t         omega,
  input  logic        go,
  input  logic [31:0] nsteps,
  output logic        busy,
  output logic        done,
  // host access
  input  logic [7:0]  host_sel,
  input  logic        host_we,
  input  logic [7:0]  host_site,
  input  logic [3:0]  host_dir,
  input  fx_t         host_wdata,
  output fx_t         host_rdata,
  // bit flips on the byte arriving at DSlave d on link l
  input  logic [7:0]  err_mask [GX*GY][NLINK],
  // status
  output logic        stall,
  output logic        int_busy,
  output logic        retx,
  output logic        crc_err
);

  localparam int ND = GX * GY;

  line_t             lo   [ND][NLINK];
  line_t             li   [ND][NLINK];
  logic [ND-1:0]     d_busy, d_done, d_stall, d_int, d_retx, d_crc;
  logic [ND-1:0]     fin_q;
  fx_t               d_rdata [ND];

  function automatic int idx(input int x, input int y);
    return ((y + GY) % GY) * GX + ((x + GX) % GX);
  endfunction

  for (genvar y = 0; y < GY; y++) begin : g_y
    for (genvar x = 0; x < GX; x++) begin : g_x
      localparam int D = y * GX + x;
      logic [NLINK-1:0] r, e;

      // a DSlave's East input is its East neighbour's West output, etc.
      always_comb begin
        li[D][LINK_E] = lo[idx(x + 1, y)][LINK_W];
        li[D][LINK_W] = lo[idx(x - 1, y)][LINK_E];
        li[D][LINK_N] = lo[idx(x, y - 1)][LINK_S];
        li[D][LINK_S] = lo[idx(x, y + 1)][LINK_N];
        for (int l = 0; l < NLINK; l++)
          li[D][l].data = li[D][l].data ^ (li[D][l].valid ? err_mask[D][l] : 8'h00);
      end

      dslave #(.N(N), .TIMEOUT(TIMEOUT)) u_dslave (
        .clk, .rst_n, .omega, .go, .nsteps,
        .busy(d_busy[D]), .done(d_done[D]), .step(),
        .host_we(host_we && host_sel == 8'(D)),
        .host_site, .host_dir, .host_wdata,
        .host_rdata(d_rdata[D]),
        .line_out(lo[D]), .line_in(li[D]),
        .stall(d_stall[D]), .int_busy(d_int[D]),
        .retx(r), .crc_err(e)
      );
      assign d_retx[D] = |r;
      assign d_crc[D]  = |e;
    end
  end

  always_comb begin
    host_rdata = '0;
    for (int d = 0; d < ND; d++)
      if (host_sel == 8'(d)) host_rdata = d_rdata[d];
  end

  assign busy     = |d_busy;
  assign stall    = |d_stall;
  assign int_busy = |d_int;
  assign retx     = |d_retx;
  assign crc_err  = |d_crc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go) fin_q <= '0;
      else if (&(fin_q | d_done)) begin
        if (fin_q != '1) done <= 1'b1;
        fin_q <= '1;
      end else begin
        fin_q <= fin_q | d_done;
      end
    end
  end

endmodule
