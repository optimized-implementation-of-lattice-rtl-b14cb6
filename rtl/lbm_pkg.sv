// lbm_pkg: types, constants and helper functions shared by the D2Q9 lattice
// Boltzmann DSlave design.
//
// The lattice is D2Q9: direction 0 is the rest particle, 1..4 point East,
// North, West, South and 5..8 point North-East, North-West, South-West and
// South-East (numbering as in the usual D2Q9 drawing). Site coordinates are
// (row, column) with row 0 at the top of an FPGA's block, so "North" means
// row - 1.
//
// Distribution values are 32-bit words, the width of the single-precision
// numbers exchanged between FPGAs. In this RTL they hold signed fixed point
// numbers with FRAC fractional bits (a design choice; see collision_unit).
//
// The four grid links of a DSlave are numbered LINK_E, LINK_N, LINK_W, LINK_S.
// The order of the words in every halo packet is given by tx_word() and the
// forwarded diagonal word by fwd_word(); both sender and receiver use them.
// crc32_byte() is the reflected CRC-32 (polynomial 0x04C11DB7) update for one
// byte, as used by Ethernet.
package lbm_pkg;

  localparam int Q      = 9;   // D2Q9 directions
  localparam int WORD_W = 32;  // width of one distribution value
  localparam int FRAC   = 24;  // fractional bits of the fixed point format

  typedef logic signed [WORD_W-1:0] fx_t;
  typedef fx_t fvec_t [Q];

  // Direction vectors (row step, column step)
  localparam int DR [Q] = '{0,  0, -1,  0, 1, -1, -1, 1, 1};
  localparam int DC [Q] = '{0,  1,  0, -1, 0,  1, -1, -1, 1};

  // Links of a DSlave in a 2D grid
  typedef enum logic [1:0] {LINK_E = 2'd0, LINK_N = 2'd1, LINK_W = 2'd2, LINK_S = 2'd3} link_e;
  localparam int NLINK = 4;

  // One clock's worth of a link line: a byte and its valid qualifier. At the
  // 125 MHz core clock one byte per cycle equals the 1 Gbit/s serial rate.
  typedef struct packed {
    logic       valid;
    logic [7:0] data;
  } line_t;

  // Packet header byte: {type[1:0], tag, seq, HDR_MARK}
  typedef enum logic [1:0] {PK_DATA = 2'b10, PK_ACK = 2'b01} pkt_e;
  localparam logic [3:0] HDR_MARK = 4'h5;

  // One word of a halo packet: site (row, col) in the sender's coordinates,
  // extended by one ghost ring (-1 .. N), and the direction it carries.
  typedef struct packed {
    logic signed [7:0] r;
    logic signed [7:0] c;
    logic [3:0]        d;
  } wref_t;

  // Sub-phase 1: word k (0 .. 3N-2) sent on link l. Each link carries the
  // axis value and both diagonals of its border row/column, except one corner
  // diagonal, which travels on the next link counter-clockwise.
  function automatic wref_t tx_word(input int n, input int l, input int k);
    wref_t w;
    int a, b;
    a = k % n;
    b = k / n;
    unique case (l)
      0: begin // East: f1 of column n-1, f5 of all rows, f8 of rows 0..n-2
        w.c = 8'(n-1);
        w.r = 8'(a);
        w.d = (b == 0) ? 4'd1 : (b == 1) ? 4'd5 : 4'd8;
      end
      1: begin // North: f2 of row 0, f6 of all columns, f5 of columns 0..n-2
        w.r = 8'sd0;
        w.c = 8'(a);
        w.d = (b == 0) ? 4'd2 : (b == 1) ? 4'd6 : 4'd5;
      end
      2: begin // West: f3 of column 0, f7 of all rows, f6 of rows 1..n-1
        w.c = 8'sd0;
        w.r = (b == 2) ? 8'(a + 1) : 8'(a);
        w.d = (b == 0) ? 4'd3 : (b == 1) ? 4'd7 : 4'd6;
      end
      default: begin // South: f4 of row n-1, f8 of all columns, f7 of columns 1..n-1
        w.r = 8'(n-1);
        w.c = (b == 2) ? 8'(a + 1) : 8'(a);
        w.d = (b == 0) ? 4'd4 : (b == 1) ? 4'd8 : 4'd7;
      end
    endcase
    return w;
  endfunction

  // Where a word sent on link l lands in the receiver's coordinates.
  function automatic wref_t rx_place(input int n, input int l, input wref_t w);
    wref_t o;
    o = w;
    unique case (l)
      0: o.c = w.c - 8'(n);
      1: o.r = w.r + 8'(n);
      2: o.c = w.c + 8'(n);
      default: o.r = w.r - 8'(n);
    endcase
    return o;
  endfunction

  // Sub-phase 2: the single word forwarded on link l. It is a ghost value
  // received in sub-phase 1 from the neighbour on the link clockwise before l,
  // whose destination lies diagonally beyond this FPGA.
  function automatic wref_t fwd_word(input int n, input int l);
    wref_t w;
    unique case (l)
      0: begin w.r = -8'sd1;  w.c = 8'(n-1); w.d = 4'd8; end // from North
      1: begin w.r = 8'sd0;   w.c = -8'sd1;  w.d = 4'd5; end // from West
      2: begin w.r = 8'(n);   w.c = 8'sd0;   w.d = 4'd6; end // from South
      default: begin w.r = 8'(n-1); w.c = 8'(n); w.d = 4'd7; end // from East
    endcase
    return w;
  endfunction

  // Reflected CRC-32 update by one byte
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] c;
    c = crc ^ {24'd0, b};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

endpackage
