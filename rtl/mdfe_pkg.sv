// mdfe_pkg: widths, constants and bundle types shared by the multi-level
// decision feedback equalizer (MDFE).
//
// The numbers follow the chip as built: an 8-bit FFE-to-FBE word, a 10-bit
// decision chain, two 2-bit look-ahead decisions, 6-bit input samples,
// 8-bit FFE coefficients in an 8-tap filter with a 14-bit internal result,
// and an 11-bit serial load word (3 address bits + 8 data bits).
// The two packed structs bundle the seven FBE tables (A_1..A_4, B, C, D):
// one for their 8-bit outputs and one for their write enables.
package mdfe_pkg;

  localparam int unsigned W         = 8;   // FBE data path width
  localparam int unsigned NDEC      = 10;  // decision shift-register length
  localparam int unsigned INIT_W    = 11;  // serial load word: addr[10:8], data[7:0]
  localparam int unsigned XW        = 6;   // FFE input sample width
  localparam int unsigned CW        = 8;   // FFE coefficient width
  localparam int unsigned TAPS      = 8;   // FFE taps
  localparam int unsigned RW        = 14;  // FFE internal / VMA width
  localparam int unsigned BEGIN_DLY = 10;  // clocks from pdata to FE

  typedef logic [W-1:0] word_t;

  // Outputs of the seven look-up tables, in the order of the thesis figures.
  typedef struct packed {
    word_t a1;  // a_k = 0, a_k+1 = 0
    word_t a2;  // a_k = 0, a_k+1 = 1
    word_t a3;  // a_k = 1, a_k+1 = 0
    word_t a4;  // a_k = 1, a_k+1 = 1
    word_t b;   // addressed by a_k-3, a_k-4
    word_t c;   // addressed by a_k-5 .. a_k-7
    word_t d;   // addressed by a_k-8 .. a_k-10
  } lut_word_t;

  // Write enables of the seven tables.
  typedef struct packed {
    logic a1, a2, a3, a4, b, c, d;
  } lut_we_t;

  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t coef_bank_t [TAPS];

endpackage
