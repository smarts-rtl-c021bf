// tb_nasti_line_port: drives line writes and reads through the NASTI port
// into a memory model with random back-pressure. Checks read-back data, the
// placement of each 64-bit beat in memory (beat i at address + 8i), the
// burst fields seen on AW and AR (len 7, size 3, INCR), the number of W and
// R beats per line and the WLAST flag.
module tb_nasti_line_port;
  import smarts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_write, rsp_valid, rsp_err;
  addr_t req_addr;
  line_t req_data, rsp_data;
  logic aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready, ar_valid, ar_ready, r_valid, r_ready;
  nasti_a_t aw, ar;
  nasti_w_t w;
  nasti_r_t r;
  logic [1:0] b_resp;
  logic bd_we;
  addr_t bd_addr;
  line_t bd_wdata, bd_rdata;
  int stall_count, words_stored;
  int checks = 0, failures = 0;
  int n_w = 0, n_r = 0, n_aw = 0, n_ar = 0, bad_burst = 0, bad_last = 0;

  nasti_line_port dut (.*);
  nasti_mem_model #(.READ_LAT(2), .STALLS(1'b1)) u_mem (.*);

  always @(posedge clk) if (rst_n) begin
    if (aw_valid && aw_ready) begin
      n_aw++;
      if (aw.len != 8'd7 || aw.size != 3'd3 || aw.burst != 2'b01) bad_burst++;
    end
    if (ar_valid && ar_ready) begin
      n_ar++;
      if (ar.len != 8'd7 || ar.size != 3'd3 || ar.burst != 2'b01) bad_burst++;
    end
    if (w_valid && w_ready) begin
      n_w++;
      if (w.last != (n_w % 8 == 0)) bad_last++;
    end
    if (r_valid && r_ready) n_r++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic line_op(input logic wr, input addr_t a, input line_t d, output line_t q);
    @(negedge clk);
    req_valid = 1'b1; req_write = wr; req_addr = a; req_data = d;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 1'b0;
    while (!rsp_valid) @(negedge clk);
    q = rsp_data;
    chk(!rsp_err, "response OKAY");
  endtask

  function automatic line_t rand_line();
    line_t v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    line_t lines [8];
    line_t q;
    req_valid = 1'b0; req_write = 1'b0; req_addr = '0; req_data = '0;
    bd_we = 1'b0; bd_addr = '0; bd_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      lines[i] = rand_line();
      line_op(1'b1, 32'h0008_0000 + 32'(i * 64), lines[i], q);
    end
    // beat placement, checked through the memory's backdoor
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      bd_addr = 32'h0008_0000 + 32'(i * 64);
      #1 chk(bd_rdata == lines[i], $sformatf("line %0d stored beat by beat", i));
    end
    // a single known beat: word 5 of line 3 sits at byte address base+3*64+40
    @(negedge clk);
    bd_addr = 32'h0008_0000 + 32'(3 * 64 + 40);
    #1 chk(bd_rdata[63:0] == lines[3][64*5 +: 64], "beat 5 at +40");
    for (int i = 7; i >= 0; i--) begin
      line_op(1'b0, 32'h0008_0000 + 32'(i * 64), '0, q);
      chk(q == lines[i], $sformatf("line %0d read back", i));
    end
    chk(n_aw == 8 && n_ar == 8, "one address transfer per line");
    chk(n_w == 64 && n_r == 64, "eight beats per line");
    chk(bad_burst == 0, "burst fields");
    chk(bad_last == 0, "WLAST on the eighth beat only");
    chk(stall_count > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
