// nasti_line_port: cache-line requests to NASTI (AXI) bursts.
//
// The MPU works on whole 512-bit cache lines; the memory controller speaks
// NASTI, the AXI-style bus of the Rocket SoC, with separate address, write
// data, write response, read address and read data channels. A line write is
// decomposed into one AW transfer and eight 64-bit W beats (INCR burst,
// len 7, size 3); a line read is one AR transfer whose eight R beats are
// aggregated back into a line. Beat i carries line bits [64*i +: 64] at
// byte address addr + 8*i. One request is outstanding at a time.
//
// Interface: req_valid/req_ready take a request; rsp_valid pulses for one
// cycle when it completes (read data on rsp_data, rsp_err set if any beat or
// the write response was not OKAY). AW and the first W beat are offered in
// the cycle after acceptance. Timing with a memory that is always ready: a
// write completes in 11 cycles plus the write-response delay, a read in
// 3 cycles plus the read latency plus 8 beats.
// The data width, one-outstanding policy and burst shape are this design's
// choices; the conversion between line requests and NASTI channels is the
// MPU's bus interface conversion. The reset is asynchronous for the logic;
// the handshake assertions at the end also use it, synchronously, to stay
// quiet during reset, which is why lint sees it used both ways.
module nasti_line_port
  import smarts_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // line side
  input  logic       req_valid,
  output logic       req_ready,
  input  logic       req_write,
  input  addr_t      req_addr,
  input  line_t      req_data,
  output logic       rsp_valid,
  output logic       rsp_err,
  output line_t      rsp_data,
  // NASTI master
  output logic       aw_valid,
  input  logic       aw_ready,
  output nasti_a_t   aw,
  output logic       w_valid,
  input  logic       w_ready,
  output nasti_w_t   w,
  input  logic       b_valid,
  output logic       b_ready,
  input  logic [1:0] b_resp,
  output logic       ar_valid,
  input  logic       ar_ready,
  output nasti_a_t   ar,
  input  logic       r_valid,
  output logic       r_ready,
  input  nasti_r_t   r
);

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_BRESP, S_RADDR, S_RDATA, S_DONE} state_e;
  state_e state_q;

  addr_t      addr_q;
  line_t      data_q;
  logic [2:0] beat_q;
  logic       aw_done_q, w_done_q, err_q;

  localparam nasti_a_t BURST = '{addr: '0, len: 8'(BEATS-1), size: 3'd3, burst: 2'b01};

  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    aw      = BURST;
    aw.addr = addr_q;
    ar      = BURST;
    ar.addr = addr_q;
    w.data  = data_q[NASTI_DW*beat_q +: NASTI_DW];
    w.strb  = '1;
    w.last  = (beat_q == 3'(BEATS-1));
  end

  assign aw_valid = (state_q == S_WRITE) && !aw_done_q;
  assign w_valid  = (state_q == S_WRITE) && !w_done_q;
  assign b_ready  = (state_q == S_BRESP);
  assign ar_valid = (state_q == S_RADDR);
  assign r_ready  = (state_q == S_RDATA);

  assign rsp_valid = (state_q == S_DONE);
  assign rsp_err   = err_q;
  assign rsp_data  = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      addr_q    <= '0;
      data_q    <= '0;
      beat_q    <= '0;
      aw_done_q <= 1'b0;
      w_done_q  <= 1'b0;
      err_q     <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          addr_q    <= req_addr & ~addr_t'(LINE_B - 1);
          data_q    <= req_data;
          beat_q    <= '0;
          aw_done_q <= 1'b0;
          w_done_q  <= 1'b0;
          err_q     <= 1'b0;
          state_q   <= req_write ? S_WRITE : S_RADDR;
        end
        S_WRITE: begin
          if (aw_valid && aw_ready) aw_done_q <= 1'b1;
          if (w_valid && w_ready) begin
            beat_q <= beat_q + 3'd1;
            if (w.last) w_done_q <= 1'b1;
          end
          if ((aw_done_q || aw_ready) && (w_done_q || (w_ready && w.last)))
            state_q <= S_BRESP;
        end
        S_BRESP: if (b_valid) begin
          err_q   <= (b_resp != 2'b00);
          state_q <= S_DONE;
        end
        S_RADDR: if (ar_ready) state_q <= S_RDATA;
        S_RDATA: if (r_valid) begin
          data_q[NASTI_DW*beat_q +: NASTI_DW] <= r.data;
          if (r.resp != 2'b00) err_q <= 1'b1;
          beat_q <= beat_q + 3'd1;
          if (r.last || beat_q == 3'(BEATS-1)) state_q <= S_DONE;
        end
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // NASTI rule: a valid, once raised, holds with a stable payload until taken.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    aw_valid && !aw_ready |=> aw_valid && $stable(aw));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    w_valid && !w_ready |=> w_valid && $stable(w));
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ar_valid && !ar_ready |=> ar_valid && $stable(ar));

endmodule
