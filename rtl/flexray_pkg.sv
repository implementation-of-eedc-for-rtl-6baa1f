// flexray_pkg: types and constants shared by the enhanced FlexRay controller.
//
// Frame header layout (40 bits, first transmitted bit first): 5 indicator
// bits (reserved, payload preamble, null frame, sync, startup), 11-bit frame
// ID, 7-bit payload length in 16-bit words, 11-bit header CRC and 6-bit
// cycle count. Payloads are 0..254 bytes. These field widths follow the
// FlexRay frame format.
//
// The trailer is the EEDC code: r redundancy bits, where r is the smallest
// value with (D + r + 1) <= 2^r for D header+payload bits. r(x) is the
// remainder of D(x)*x^r divided by a primitive polynomial of degree r, so the
// trailer is a shortened cyclic Hamming code: any single bit error gives a
// distinct non-zero syndrome and can be located and corrected. The choice of
// primitive polynomials is this design's own. The trailer is sent as
// ceil(r/8) bytes with r right aligned and the unused upper bits zero.
package flexray_pkg;

  localparam int unsigned HDR_BYTES     = 5;
  localparam int unsigned MAX_PAYLOAD   = 254;  // bytes
  localparam int unsigned MAX_DATA      = HDR_BYTES + MAX_PAYLOAD;  // 259 bytes
  localparam int unsigned EEDC_RMAX     = 12;   // r for 2072 data bits
  localparam int unsigned MAX_TRAILER   = 2;    // bytes
  localparam int unsigned MAX_FRAME     = MAX_DATA + MAX_TRAILER;  // 261 bytes

  typedef struct packed {
    logic        reserved;
    logic        preamble;
    logic        null_n;     // 0: null frame
    logic        sync;
    logic        startup;
    logic [10:0] frame_id;
    logic [6:0]  plen;       // payload length in 16-bit words
    logic [10:0] hdr_crc;
    logic [5:0]  cycle;
  } frame_hdr_t;

  // Status that frame processing reports for one received frame.
  typedef struct packed {
    logic valid_frame;
    logic syntax_error;
    logic content_error;
    logic boundary_violation;
    logic eedc_corrected;
    logic eedc_uncorrectable;
  } rx_status_t;

  // Filter of one receive buffer: each enabled field must match exactly.
  typedef struct packed {
    logic        en;
    logic        use_fid;
    logic        use_cyc;
    logic        use_msg;
    logic [10:0] fid;
    logic [5:0]  cyc;
    logic [15:0] msg_id;
  } rxb_filter_t;

  // One acceptance filter pair of the receive FIFO: a frame matches when
  // ((field ^ data) & mask) == 0 for frame ID, cycle and message ID.
  typedef struct packed {
    logic        en;
    logic [10:0] fid_mask;
    logic [10:0] fid_data;
    logic [5:0]  cyc_mask;
    logic [5:0]  cyc_data;
    logic [15:0] msg_mask;
    logic [15:0] msg_data;
  } acc_filter_t;

  typedef enum logic [3:0] {
    POC_DEFAULT_CONFIG = 4'd0,
    POC_CONFIG         = 4'd1,
    POC_READY          = 4'd2,
    POC_WAKEUP         = 4'd3,
    POC_STARTUP        = 4'd4,
    POC_NORMAL_ACTIVE  = 4'd5,
    POC_NORMAL_PASSIVE = 4'd6,
    POC_HALT           = 4'd7
  } poc_state_t;

  typedef enum logic [2:0] {
    CMD_NONE   = 3'd0,
    CMD_CONFIG = 3'd1,
    CMD_READY  = 3'd2,
    CMD_WAKEUP = 3'd3,
    CMD_RUN    = 3'd4,
    CMD_HALT   = 3'd5,
    CMD_FREEZE = 3'd6,
    CMD_CONFIG_DONE = 3'd7
  } poc_cmd_t;

  typedef enum logic [2:0] {
    SEG_IDLE, SEG_STATIC, SEG_DYNAMIC, SEG_SYMBOL, SEG_NIT
  } segment_t;

  // Number of EEDC redundancy bits for a given number of data bits:
  // smallest r with data_bits + r + 1 <= 2^r.
  function automatic logic [3:0] eedc_r(input logic [11:0] data_bits);
    logic [3:0] r;
    r = 4'd12;
    for (int k = 12; k >= 2; k--)
      if ((32'(data_bits) + 32'(k) + 1) <= (32'd1 << k)) r = 4'(k);
    return r;
  endfunction

  // Primitive polynomial of degree r, without its x^r term.
  function automatic logic [EEDC_RMAX-1:0] eedc_poly(input logic [3:0] r);
    case (r)
      4'd2:    return 12'h003;  // x^2+x+1
      4'd3:    return 12'h003;  // x^3+x+1
      4'd4:    return 12'h003;  // x^4+x+1
      4'd5:    return 12'h005;  // x^5+x^2+1
      4'd6:    return 12'h003;  // x^6+x+1
      4'd7:    return 12'h003;  // x^7+x+1
      4'd8:    return 12'h01D;  // x^8+x^4+x^3+x^2+1
      4'd9:    return 12'h011;  // x^9+x^4+1
      4'd10:   return 12'h009;  // x^10+x^3+1
      4'd11:   return 12'h005;  // x^11+x^2+1
      default: return 12'h053;  // x^12+x^6+x^4+x+1
    endcase
  endfunction

  // One step of division by the degree-r polynomial: shift remainder 'rem'
  // with input bit 'din' (CRC-style LFSR, computes D(x)*x^r mod p(x)).
  function automatic logic [EEDC_RMAX-1:0] eedc_step(input logic [EEDC_RMAX-1:0] rem,
                                                      input logic din,
                                                      input logic [3:0] r);
    logic [EEDC_RMAX-1:0] mask, nxt;
    logic fb;
    mask = (EEDC_RMAX'(1) << r) - EEDC_RMAX'(1);
    fb   = din ^ rem[r-1];
    nxt  = (rem << 1) & mask;
    if (fb) nxt = nxt ^ (eedc_poly(r) & mask);
    return nxt;
  endfunction

  // Multiply by x modulo the degree-r polynomial (used by the error locator).
  function automatic logic [EEDC_RMAX-1:0] eedc_mulx(input logic [EEDC_RMAX-1:0] v,
                                                      input logic [3:0] r);
    return eedc_step(v, 1'b0, r);
  endfunction

  // Number of data bytes and trailer bytes for a payload length in words.
  function automatic logic [8:0] data_bytes(input logic [6:0] plen);
    return 9'(HDR_BYTES) + {1'b0, plen, 1'b0};
  endfunction

  function automatic logic [1:0] trailer_bytes(input logic [3:0] r);
    return (r > 4'd8) ? 2'd2 : 2'd1;
  endfunction

endpackage
