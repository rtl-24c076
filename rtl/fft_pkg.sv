// fft_pkg: types and constants shared by the variable-length FFT processor.
//
// The processor is an in-place, memory-based radix-2^2/2 DIF FFT whose
// largest length is 8192 points (13 address bits). Shorter transforms
// (4096, 2048, 1024, 512, 256 and 64 points) run inside the same 8192-word
// address space: the butterfly counter steps by 2^c, where 2^c is the ratio
// of the longest to the current length, so a length-L transform occupies the
// addresses that are multiples of 2^c. The seven lengths, the counter steps
// (1,2,4,8,16,32,128) and the maximum stage counts (13,12,11,10,9,8,6) are
// those of the published data address generator; the mode encoding, the
// 16-bit complex data word and the 12-bit twiddle word are choices of this
// design.
package fft_pkg;

  // Address space of the longest transform.
  localparam int unsigned LOG_NMAX = 13;                 // 8192 points
  localparam int unsigned NMAX     = 1 << LOG_NMAX;
  localparam int unsigned ADDR_W   = LOG_NMAX;           // s,t,u,v width
  localparam int unsigned BFC_W    = LOG_NMAX - 2;       // butterfly counter [10:0]
  localparam int unsigned BANKS    = 4;                  // one per PE port
  localparam int unsigned BANK_AW  = LOG_NMAX - 2;       // words per bank: NMAX/4
  localparam int unsigned STG_W    = 4;                  // stage counter width

  // Word lengths (not given for the FFT datapath; chosen here).
  localparam int unsigned DW = 16;                       // real/imag data, Q1.15
  localparam int unsigned TW = 12;                       // real/imag twiddle, Q1.11

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twid_t;

  // FFT length selection ("mode select").
  typedef enum logic [2:0] {
    MODE_8192 = 3'd0,
    MODE_4096 = 3'd1,
    MODE_2048 = 3'd2,
    MODE_1024 = 3'd3,
    MODE_512  = 3'd4,
    MODE_256  = 3'd5,
    MODE_64   = 3'd6
  } fft_mode_e;

  // Per-bit control of the shift-insert-bypass multiplexer (MUX_n).
  typedef enum logic [1:0] {
    SIB_I0 = 2'd0,   // insert symbol bit 0
    SIB_I1 = 2'd1,   // insert symbol bit 1
    SIB_BP = 2'd2,   // bypass: butterfly counter bit n
    SIB_S2 = 2'd3    // shift 2: butterfly counter bit n-2
  } sib_sel_e;

  // log2 of the transform length: also the maximum stage count.
  function automatic logic [STG_W-1:0] mode_log2(fft_mode_e m);
    case (m)
      MODE_8192: return 4'd13;
      MODE_4096: return 4'd12;
      MODE_2048: return 4'd11;
      MODE_1024: return 4'd10;
      MODE_512:  return 4'd9;
      MODE_256:  return 4'd8;
      MODE_64:   return 4'd6;
      default:   return 4'd13;
    endcase
  endfunction

  // c = log2(NMAX / length): the butterfly counter steps by 2^c.
  function automatic logic [3:0] mode_shift(fft_mode_e m);
    return 4'(LOG_NMAX) - mode_log2(m);
  endfunction

  // Lengths that are not a power of four start with one radix-2 stage.
  function automatic logic mode_pow4(fft_mode_e m);
    return ~mode_log2(m)[0];
  endfunction

endpackage
