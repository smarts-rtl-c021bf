// smarts_pkg: types, sizes and helper functions shared by the memory
// protection unit (MPU).
//
// Sizes that come from the MPU's published instantiation: a 512-bit cache
// line, 56-bit counters, 64-bit tags, an 8-ary counter tree and a 128 MB
// trusted region (2^21 lines). With those numbers one metadata line holds
// exactly eight counters and one tag (8*56 + 64 = 512).
// This design's own choices: AES-128, a 96-bit GCM nonce built as
// IV(8) || line address(32) || counter(56), 32-bit bus addresses and a
// 64-bit NASTI data path. The AES S-box table is computed at elaboration (GF(2^8)
// inverse followed by the affine map) rather than typed in.
package smarts_pkg;

  localparam int unsigned LINE_W   = 512;  // cache line, bits
  localparam int unsigned LINE_B   = LINE_W / 8;
  localparam int unsigned CTR_W    = 56;   // per-line / per-node counter
  localparam int unsigned TAG_W    = 64;   // MAC (truncated GCM tag)
  localparam int unsigned ARITY    = 8;    // counters per metadata line
  localparam int unsigned ADDR_W   = 32;   // physical byte address
  localparam int unsigned IV_W     = 8;
  localparam int unsigned NONCE_W  = 96;
  localparam int unsigned BLK_W    = 128;  // AES block
  localparam int unsigned NBLK     = LINE_W / BLK_W;  // 4 blocks per line
  localparam int unsigned NASTI_DW = 64;
  localparam int unsigned BEATS    = LINE_W / NASTI_DW; // 8 beats per line

  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [CTR_W-1:0]   ctr_t;
  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [NONCE_W-1:0] nonce_t;
  typedef logic [BLK_W-1:0]   blk_t;

  // A metadata node (counter block or tree node): tag in the top 64 bits,
  // counter i in bits [56*i +: 56].
  typedef struct packed {
    tag_t            tag;
    ctr_t [ARITY-1:0] ctr;
  } node_t;

  // Address class decided by the range registers.
  typedef enum logic [1:0] {
    REG_UNTRUSTED = 2'd0,
    REG_TRUSTED   = 2'd1,
    REG_METADATA  = 2'd2
  } region_e;

  // Line request on the upstream (TileLink Acquire) side.
  typedef struct packed {
    logic  write;
    addr_t addr;
    line_t data;
  } acq_t;

  // Line response on the upstream (TileLink Grant) side.
  typedef struct packed {
    logic  error;   // access denied or authentication failure
    line_t data;
  } gnt_t;

  // NASTI (AXI) channel payloads.
  typedef struct packed {
    addr_t      addr;
    logic [7:0] len;
    logic [2:0] size;
    logic [1:0] burst;
  } nasti_a_t;

  typedef struct packed {
    logic [NASTI_DW-1:0]   data;
    logic [NASTI_DW/8-1:0] strb;
    logic                  last;
  } nasti_w_t;

  typedef struct packed {
    logic [NASTI_DW-1:0] data;
    logic [1:0]          resp;
    logic                last;
  } nasti_r_t;

  // Trusted-region default: 128 MB of 64-byte lines = 2^21 lines.
  localparam int unsigned LINE_AW_DEFAULT = 21;

  // Metadata layout, in lines from the metadata base, for a trusted region of
  // 2^line_aw lines. First the tag lines (eight 64-bit line tags each), then
  // the node levels: level 0 holds the counter blocks (eight per-line
  // counters each), level j+1 the tree nodes whose counters cover eight
  // level-j nodes. Level j has 2^(line_aw-3(j+1)) nodes; the single node above
  // the last stored level is the root and stays on chip.
  function automatic int unsigned n_levels(input int unsigned line_aw);
    return line_aw / 3 - 1;
  endfunction

  function automatic int unsigned level_offset(input int unsigned line_aw, input int unsigned lev);
    int unsigned off;
    off = 1 << (line_aw - 3);           // tag lines
    for (int unsigned i = 0; i < lev; i++) off += 1 << (line_aw - 3*(i+1));
    return off;
  endfunction

  function automatic int unsigned meta_lines(input int unsigned line_aw);
    return level_offset(line_aw, n_levels(line_aw));
  endfunction

  localparam logic [7:0] SBOX_POLY = 8'h1b;

  function automatic logic [7:0] gf8_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[7] ? ((aa << 1) ^ SBOX_POLY) : (aa << 1);
    end
    return p;
  endfunction

  // Multiplicative inverse in GF(2^8) as a^254 (0 maps to 0).
  function automatic logic [7:0] gf8_inv(input logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128, r;
    a2   = gf8_mul(a, a);
    a4   = gf8_mul(a2, a2);
    a8   = gf8_mul(a4, a4);
    a16  = gf8_mul(a8, a8);
    a32  = gf8_mul(a16, a16);
    a64  = gf8_mul(a32, a32);
    a128 = gf8_mul(a64, a64);
    r = gf8_mul(a128, a64);
    r = gf8_mul(r, a32);
    r = gf8_mul(r, a16);
    r = gf8_mul(r, a8);
    r = gf8_mul(r, a4);
    r = gf8_mul(r, a2);
    return r;
  endfunction

  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] b, s;
    b = gf8_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  typedef logic [7:0] sbox_tab_t [256];

  function automatic sbox_tab_t sbox_gen();
    sbox_tab_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  // The S-box as a constant table, filled at elaboration.
  localparam sbox_tab_t SBOX_TAB = sbox_gen();

  function automatic logic [7:0] aes_sbox(input logic [7:0] a);
    return SBOX_TAB[a];
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return a[7] ? ((a << 1) ^ SBOX_POLY) : (a << 1);
  endfunction

endpackage
