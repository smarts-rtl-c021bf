// mpu_ctrl: request sequencer of the memory protection unit.
//
// Every cache-line request from the L2 side (a TileLink Acquire) is checked
// against the range registers and handled in one of four ways:
//  * untrusted region, or protection disabled: forwarded to memory as is;
//  * metadata region: refused with an error (software may not touch it);
//  * trusted-region read: the path of metadata nodes, from the level below
//    the on-chip root down to the line's counter block, then the tag line and
//    the ciphertext line are fetched. Each node's tag is recomputed with
//    AES-GCM over its eight counters, using the parent's counter for that node
//    as the nonce counter (the root's counters for the topmost stored node),
//    and compared. Fetching top-down lets each node be checked as soon as it
//    arrives, so authentication overlaps the memory latency of the lines
//    still being fetched. The line is then decrypted with nonce IV || address ||
//    counter and its tag compared. Any mismatch returns an error and zero
//    data and pulses auth_fail;
//  * trusted-region write: the same path is fetched and verified, then the
//    line's counter and every ancestor counter up to the root are
//    incremented, every node's tag on the path is recomputed, the line is
//    encrypted under the new counter, and the nodes, the ciphertext and the
//    tag line are written back.
// This is a Bonsai Merkle tree: the tree covers only the counters, and a
// line's tag binds data, address and counter, so spoofing, splicing and
// replay of data or metadata all show up as a tag mismatch.
// An initialisation pass writes every counter block and tree node with zero
// counters and a valid tag and clears the root; until it has run, trusted
// accesses are refused.
//
// Interfaces: acq_* / gnt_* carry one request and one response at a time
// (valid/ready); m_* drive a line-granular memory port (nasti_line_port);
// g_* drive the shared AES-GCM engine; chk_* ask the range registers to
// classify the request address.
// Timing: requests are handled one at a time. A trusted read costs
// (NLEV + 2) line reads and (NLEV + 1) GCM operations, a trusted write
// NLEV + 1 reads, 2*NLEV + 1 GCM operations and NLEV + 2 line writes, where
// NLEV = LINE_AW/3 - 1 is the number of stored node levels (6 by default).
// The tree shape, sizes and MAC inputs follow the MPU's description; the
// sequencing (top-down fetch with overlapped checks, then update, then
// write-back), the initialisation pass,
// error responses and metadata layout are this design's choices.
module mpu_ctrl
  import smarts_pkg::*;
#(
  parameter int unsigned LINE_AW = LINE_AW_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  // L2 side
  input  logic              acq_valid,
  output logic              acq_ready,
  input  acq_t              acq,
  output logic              gnt_valid,
  input  logic              gnt_ready,
  output gnt_t              gnt,
  // range registers
  output addr_t             chk_addr,
  input  region_e           chk_region,
  input  logic [LINE_AW-1:0] chk_line,
  input  addr_t             meta_base,
  input  logic [IV_W-1:0]   iv,
  input  logic              init_req,
  output logic              init_done,
  // memory port
  output logic              m_req_valid,
  input  logic              m_req_ready,
  output logic              m_req_write,
  output addr_t             m_req_addr,
  output line_t             m_req_data,
  input  logic              m_rsp_valid,
  input  logic              m_rsp_err,
  input  line_t             m_rsp_data,
  // AES-GCM engine
  output logic              g_start,
  input  logic              g_ready,
  output logic              g_enc,
  output nonce_t            g_nonce,
  output line_t             g_din,
  input  logic              g_done,
  input  line_t             g_dout,
  input  tag_t              g_tag,
  // status
  output logic              auth_fail
);

  localparam int unsigned NLEV = n_levels(LINE_AW);
  localparam int unsigned LW   = $clog2(NLEV + 2);   // fetch/write target index
  localparam int unsigned IW   = LINE_AW - 3;        // widest node index

  initial assert (LINE_AW % 3 == 0 && LINE_AW >= 6)
    else $error("LINE_AW must be a multiple of 3, at least 6");

  typedef enum logic [3:0] {
    S_IDLE, S_PASS, S_FETCH, S_MEM, S_DECRYPT, S_BUMP,
    S_RETAG, S_ENCRYPT, S_GRANT, S_INIT, S_INIT_WR
  } state_e;
  state_e state_q, after_mem_q;

  acq_t               req_q;
  logic [LINE_AW-1:0] line_q;
  node_t              nbuf_q [NLEV];
  ctr_t               root_q [ARITY];
  line_t              dbuf_q, tbuf_q;
  logic               fail_q, gcm_busy_q, mem_busy_q;
  logic [LW-1:0]      tgt_q, tgt_last_q;   // 0 data line, 1 tag line, 2+j node j
  logic               mem_wr_q;
  logic [LW-1:0]      lev_q;                // node level in verify/retag/init
  logic [IW-1:0]      iidx_q;               // node index during init
  logic               init_pend_q;
  logic [NLEV+1:0]    got_q;                // fetched targets, by index
  logic               fdone_q, vdone_q;     // path fetched / path verified

  // ---- address arithmetic ----
  // slot that the path's level-lev node (index line >> 3(lev+1)) occupies
  // among its parent's eight counters
  function automatic logic [2:0] slot_of(input logic [LINE_AW-1:0] line, input int unsigned lev);
    return 3'((32'(line) >> (3*(lev+1))) & 7);
  endfunction

  // line offset of each stored level from the metadata base
  typedef addr_t lev_off_t [NLEV];
  function automatic lev_off_t lev_off_gen();
    lev_off_t t;
    for (int j = 0; j < NLEV; j++) t[j] = addr_t'(level_offset(LINE_AW, j));
    return t;
  endfunction
  localparam lev_off_t LEV_OFF = lev_off_gen();

  function automatic addr_t node_addr(input addr_t base, input int unsigned lev, input logic [IW-1:0] idx);
    return base + (LEV_OFF[lev] << 6) + (addr_t'(idx) << 6);
  endfunction

  function automatic logic [IW-1:0] node_idx(input logic [LINE_AW-1:0] line, input int unsigned lev);
    return IW'(32'(line) >> (3*(lev+1)));
  endfunction

  addr_t tgt_addr;
  line_t tgt_wdata;
  always_comb begin
    tgt_addr  = {req_q.addr[ADDR_W-1:6], 6'd0};
    tgt_wdata = dbuf_q;
    if (tgt_q == LW'(1)) begin
      tgt_addr  = meta_base + ((addr_t'(line_q) >> 3) << 6);
      tgt_wdata = tbuf_q;
    end else if (tgt_q >= LW'(2)) begin
      tgt_addr  = node_addr(meta_base, int'(tgt_q) - 2, node_idx(line_q, int'(tgt_q) - 2));
      tgt_wdata = nbuf_q[int'(tgt_q) - 2];
    end
  end

  // parent counter of the node at level lev on the current path
  function automatic ctr_t parent_ctr(input int unsigned lev);
    logic [2:0] s;
    s = slot_of(line_q, lev);
    if (lev == NLEV - 1) return root_q[s];
    return nbuf_q[lev+1].ctr[s];
  endfunction

  ctr_t  lev_parent;
  addr_t lev_addr;
  assign lev_parent = parent_ctr(int'(lev_q));
  assign lev_addr   = node_addr(meta_base, int'(lev_q), node_idx(line_q, int'(lev_q)));

  ctr_t leaf_ctr;
  assign leaf_ctr = nbuf_q[0].ctr[line_q[2:0]];

  tag_t line_tag;
  assign line_tag = tbuf_q[TAG_W*line_q[2:0] +: TAG_W];

  // ---- outputs ----
  assign chk_addr  = acq.addr;
  assign acq_ready = (state_q == S_IDLE) && !init_req && !init_pend_q;
  assign gnt_valid = (state_q == S_GRANT);
  assign gnt.error = fail_q;
  assign gnt.data  = fail_q ? '0 : dbuf_q;

  assign m_req_valid = (state_q == S_MEM || state_q == S_PASS || state_q == S_INIT_WR ||
                        (state_q == S_FETCH && !fdone_q)) && !mem_busy_q;
  always_comb begin
    m_req_write = mem_wr_q;
    m_req_addr  = tgt_addr;
    m_req_data  = tgt_wdata;
    if (state_q == S_PASS) begin
      m_req_write = req_q.write;
      m_req_addr  = req_q.addr;
      m_req_data  = req_q.data;
    end else if (state_q == S_INIT_WR) begin
      m_req_write = 1'b1;
      m_req_addr  = node_addr(meta_base, int'(lev_q), iidx_q);
      m_req_data  = {g_tag, {(ARITY*CTR_W){1'b0}}};
    end
  end

  // during the fetch, a node's check starts as soon as the node has arrived
  // (its parent, fetched earlier, or the root supplies the counter)
  assign g_start = ((state_q inside {S_DECRYPT, S_RETAG, S_ENCRYPT, S_INIT}) ||
                    (state_q == S_FETCH && !vdone_q && got_q[int'(lev_q) + 2]))
                   && !gcm_busy_q && g_ready;
  always_comb begin
    g_enc   = 1'b1;
    g_nonce = {iv, lev_addr, lev_parent};
    g_din   = {{TAG_W{1'b0}}, nbuf_q[lev_q].ctr};
    unique case (state_q)
      S_DECRYPT: begin
        g_enc   = 1'b0;
        g_nonce = {iv, req_q.addr, leaf_ctr};
        g_din   = dbuf_q;
      end
      S_ENCRYPT: begin
        g_nonce = {iv, req_q.addr, leaf_ctr};
        g_din   = req_q.data;
      end
      S_INIT: begin
        g_nonce = {iv, node_addr(meta_base, int'(lev_q), iidx_q), {CTR_W{1'b0}}};
        g_din   = '0;
      end
      default: ;
    endcase
  end

  // ---- sequencer ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      after_mem_q <= S_IDLE;
      req_q       <= '0;
      line_q      <= '0;
      dbuf_q      <= '0;
      tbuf_q      <= '0;
      fail_q      <= 1'b0;
      gcm_busy_q  <= 1'b0;
      mem_busy_q  <= 1'b0;
      tgt_q       <= '0;
      tgt_last_q  <= '0;
      mem_wr_q    <= 1'b0;
      lev_q       <= '0;
      iidx_q      <= '0;
      got_q       <= '0;
      fdone_q     <= 1'b0;
      vdone_q     <= 1'b0;
      init_done   <= 1'b0;
      init_pend_q <= 1'b0;
      auth_fail   <= 1'b0;
      for (int i = 0; i < ARITY; i++) root_q[i] <= '0;
      for (int j = 0; j < NLEV; j++) nbuf_q[j] <= '0;
    end else begin
      auth_fail <= 1'b0;
      if (init_req) init_pend_q <= 1'b1;
      if (g_start) gcm_busy_q <= 1'b1;
      if (m_req_valid && m_req_ready) mem_busy_q <= 1'b1;

      unique case (state_q)
        S_IDLE: begin
          fail_q <= 1'b0;
          if (init_req || init_pend_q) begin
            init_pend_q <= 1'b0;
            init_done <= 1'b0;
            lev_q     <= '0;
            iidx_q    <= '0;
            for (int i = 0; i < ARITY; i++) root_q[i] <= '0;
            state_q   <= S_INIT;
          end else if (acq_valid) begin
            req_q  <= acq;
            line_q <= chk_line;
            unique case (chk_region)
              REG_METADATA: begin
                fail_q  <= 1'b1;
                state_q <= S_GRANT;
              end
              REG_TRUSTED: begin
                if (!init_done) begin
                  fail_q  <= 1'b1;
                  state_q <= S_GRANT;
                end else begin
                  // fetch top-down: node NLEV-1 .. node 0, tag line,
                  // then the data line (reads only); verify alongside
                  tgt_q    <= LW'(NLEV + 1);
                  got_q    <= '0;
                  fdone_q  <= 1'b0;
                  vdone_q  <= 1'b0;
                  lev_q    <= LW'(NLEV - 1);
                  mem_wr_q <= 1'b0;
                  state_q  <= S_FETCH;
                end
              end
              default: state_q <= S_PASS;
            endcase
          end
        end

        S_PASS: if (m_rsp_valid) begin
          mem_busy_q <= 1'b0;
          dbuf_q     <= m_rsp_data;
          fail_q     <= m_rsp_err;
          state_q    <= S_GRANT;
        end

        // fetch the path and check each node's tag while the next line is
        // still on its way from memory
        S_FETCH: begin
          if (m_rsp_valid) begin
            mem_busy_q <= 1'b0;
            if (m_rsp_err) fail_q <= 1'b1;
            got_q[tgt_q] <= 1'b1;
            if (tgt_q == LW'(0))      dbuf_q <= m_rsp_data;
            else if (tgt_q == LW'(1)) tbuf_q <= m_rsp_data;
            else                      nbuf_q[int'(tgt_q) - 2] <= m_rsp_data;
            if (tgt_q >= LW'(2))                        tgt_q   <= tgt_q - LW'(1);
            else if (tgt_q == LW'(1) && !req_q.write)   tgt_q   <= LW'(0);
            else                                        fdone_q <= 1'b1;
          end
          if (g_done) begin
            gcm_busy_q <= 1'b0;
            if (g_tag != nbuf_q[lev_q].tag) fail_q <= 1'b1;
            if (lev_q == LW'(0)) vdone_q <= 1'b1;
            else                 lev_q   <= lev_q - LW'(1);
          end
          if (fdone_q && vdone_q) state_q <= req_q.write ? S_BUMP : S_DECRYPT;
        end

        // write back the targets tgt_q .. tgt_last_q, one line at a time
        S_MEM: if (m_rsp_valid) begin
          mem_busy_q <= 1'b0;
          if (m_rsp_err) fail_q <= 1'b1;
          if (tgt_q == tgt_last_q) state_q <= after_mem_q;
          else                     tgt_q   <= tgt_q + LW'(1);
        end

        S_DECRYPT: if (g_done) begin
          gcm_busy_q <= 1'b0;
          dbuf_q     <= g_dout;
          if (g_tag != line_tag) fail_q <= 1'b1;
          if (g_tag != line_tag || fail_q) auth_fail <= 1'b1;
          state_q    <= S_GRANT;
        end

        // verified write path: advance the line counter and every ancestor
        S_BUMP: begin
          if (fail_q) begin
            auth_fail <= 1'b1;
            state_q   <= S_GRANT;
          end else begin
            nbuf_q[0].ctr[line_q[2:0]] <= leaf_ctr + CTR_W'(1);
            for (int j = 0; j < NLEV; j++) begin
              if (j == NLEV - 1)
                root_q[slot_of(line_q, j)] <= root_q[slot_of(line_q, j)] + CTR_W'(1);
              else
                nbuf_q[j+1].ctr[slot_of(line_q, j)] <= nbuf_q[j+1].ctr[slot_of(line_q, j)] + CTR_W'(1);
            end
            lev_q   <= '0;
            state_q <= S_RETAG;
          end
        end

        S_RETAG: if (g_done) begin
          gcm_busy_q         <= 1'b0;
          nbuf_q[lev_q].tag  <= g_tag;
          if (lev_q == LW'(NLEV - 1)) state_q <= S_ENCRYPT;
          else                        lev_q   <= lev_q + LW'(1);
        end

        S_ENCRYPT: if (g_done) begin
          gcm_busy_q <= 1'b0;
          dbuf_q     <= g_dout;
          tbuf_q[TAG_W*line_q[2:0] +: TAG_W] <= g_tag;
          // write back: data line, tag line, nodes 0..NLEV-1
          tgt_q       <= LW'(0);
          tgt_last_q  <= LW'(NLEV + 1);
          mem_wr_q    <= 1'b1;
          after_mem_q <= S_GRANT;
          state_q     <= S_MEM;
        end

        S_GRANT: if (gnt_ready) state_q <= S_IDLE;

        // initialisation: one GCM tag and one line write per stored node
        S_INIT: if (g_done) begin
          gcm_busy_q <= 1'b0;
          state_q    <= S_INIT_WR;
        end

        S_INIT_WR: if (m_rsp_valid) begin
          mem_busy_q <= 1'b0;
          if (32'(iidx_q) == (32'd1 << (LINE_AW - 3*(int'(lev_q)+1))) - 32'd1) begin
            iidx_q <= '0;
            if (lev_q == LW'(NLEV - 1)) begin
              init_done <= 1'b1;
              state_q   <= S_IDLE;
            end else begin
              lev_q   <= lev_q + LW'(1);
              state_q <= S_INIT;
            end
          end else begin
            iidx_q  <= iidx_q + IW'(1);
            state_q <= S_INIT;
          end
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
