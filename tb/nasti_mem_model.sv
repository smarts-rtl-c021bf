// nasti_mem_model: behavioural NASTI (AXI) slave standing in for the memory
// controller and DRAM in the testbenches. Not synthesizable.
//
// Storage is sparse (an associative array of 64-bit words), so a full-size
// address map costs only what is touched; unwritten words read as zero.
// INCR bursts only. Write data is accepted after its AW; the write response
// follows the last beat after one cycle. Reads return their beats after
// READ_LAT cycles. With STALLS set, ready and valid signals are withheld at
// random to exercise back-pressure; `stall_count` counts the cycles lost.
// A backdoor port reads and writes whole 64-byte lines in zero time, the way
// an attacker with a probe on the DRAM bus would, for tamper tests.
module nasti_mem_model
  import smarts_pkg::*;
#(
  parameter int unsigned READ_LAT = 4,
  parameter bit          STALLS   = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       aw_valid,
  output logic       aw_ready,
  input  nasti_a_t   aw,
  input  logic       w_valid,
  output logic       w_ready,
  input  nasti_w_t   w,
  output logic       b_valid,
  input  logic       b_ready,
  output logic [1:0] b_resp,
  input  logic       ar_valid,
  output logic       ar_ready,
  input  nasti_a_t   ar,
  output logic       r_valid,
  input  logic       r_ready,
  output nasti_r_t   r,
  // backdoor, line granular
  input  logic       bd_we,
  input  addr_t      bd_addr,
  input  line_t      bd_wdata,
  output line_t      bd_rdata,
  output int         stall_count,
  output int         words_stored
);

  logic [63:0] mem [logic [28:0]];

  function automatic logic [63:0] rd_word(input addr_t a);
    if (mem.exists(a[31:3])) return mem[a[31:3]];
    return 64'd0;
  endfunction

  always_comb begin
    for (int i = 0; i < BEATS; i++) bd_rdata[64*i +: 64] = rd_word(bd_addr + 32'(8*i));
  end

  // write side
  logic       aw_have;
  addr_t      waddr;
  logic       stall_w, stall_r;

  assign aw_ready = !aw_have && !b_valid;
  assign w_ready  = aw_have && !stall_w;
  assign b_resp   = 2'b00;

  // read side
  logic       r_busy;
  addr_t      raddr;
  int         r_wait;
  logic [3:0] r_left;

  assign ar_ready = !r_busy;
  assign r_valid  = r_busy && (r_wait == 0) && !stall_r;
  assign r.data   = rd_word(raddr);
  assign r.resp   = 2'b00;
  assign r.last   = (r_left == 4'd1);

  always_ff @(posedge clk) begin
    stall_w <= STALLS && ($urandom_range(0, 3) == 0);
    stall_r <= STALLS && ($urandom_range(0, 3) == 0);
    words_stored <= mem.num();
    if (!rst_n) begin
      aw_have     <= 1'b0;
      b_valid     <= 1'b0;
      r_busy      <= 1'b0;
      r_wait      <= 0;
      r_left      <= '0;
      stall_count <= 0;
    end else begin
      if (bd_we)
        for (int i = 0; i < BEATS; i++) mem[29'((bd_addr + 32'(8*i)) >> 3)] = bd_wdata[64*i +: 64];
      if (aw_valid && aw_ready) begin
        aw_have <= 1'b1;
        waddr   <= aw.addr;
      end
      if (w_valid && w_ready) begin
        mem[waddr[31:3]] = w.data;
        waddr <= waddr + 32'd8;
        if (w.last) begin
          aw_have <= 1'b0;
          b_valid <= 1'b1;
        end
      end
      if (b_valid && b_ready) b_valid <= 1'b0;
      if (ar_valid && ar_ready) begin
        r_busy <= 1'b1;
        raddr  <= ar.addr;
        r_wait <= int'(READ_LAT);
        r_left <= 4'(ar.len) + 4'd1;
      end
      if (r_busy && r_wait > 0) r_wait <= r_wait - 1;
      if (r_valid && r_ready) begin
        raddr  <= raddr + 32'd8;
        r_left <= r_left - 4'd1;
        if (r_left == 4'd1) r_busy <= 1'b0;
      end
      if ((aw_have && stall_w) || (r_busy && r_wait == 0 && stall_r)) stall_count <= stall_count + 1;
    end
  end

endmodule
