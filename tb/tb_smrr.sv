// tb_smrr: checks the range registers at their default size (128 MB trusted
// region): register write and read-back, the address classes at both edges
// of the trusted and metadata regions, the line index inside the trusted
// region, the effect of the enable bit, the init pulse, and that the lock
// bit freezes every register.
module tb_smrr;
  import smarts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cfg_we;
  logic [1:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  addr_t       tr_base, meta_base, chk_addr;
  logic [7:0]  iv;
  logic        enable, locked, init_req;
  region_e     chk_region;
  logic [20:0] chk_line;
  int checks = 0, failures = 0;

  smrr dut (.*);

  // sizes worked out by hand: 2^21 lines of 64 B; metadata = 2^18 tag lines
  // + 2^18 + 2^15 + 2^12 + 2^9 + 2^6 + 2^3 node lines
  localparam longint TR_BYTES   = 64'd134217728;
  localparam longint META_BYTES = (64'd262144 + 64'd299592) * 64;
  localparam addr_t  TB  = 32'h4000_0000;
  localparam addr_t  MB  = 32'h8000_0000;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic cls(input addr_t a, input region_e exp, input string what);
    chk_addr = a;
    #1;
    chk(chk_region == exp, $sformatf("%s: %h class %0d", what, a, chk_region));
  endtask

  initial begin
    int pulses;
    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; chk_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wr(2'd0, TB);
    wr(2'd1, MB | 32'h3f);        // low bits ignored: line aligned
    wr(2'd2, 32'h1a5);
    cfg_addr = 2'd0; #1 chk(cfg_rdata == TB, "trusted base read back");
    cfg_addr = 2'd1; #1 chk(cfg_rdata == MB, "metadata base aligned");
    cfg_addr = 2'd2; #1 chk(cfg_rdata == 32'ha5, "IV keeps 8 bits");
    cls(TB, REG_UNTRUSTED, "disabled");
    wr(2'd3, 32'h1);
    cls(TB - 1, REG_UNTRUSTED, "below trusted");
    cls(TB, REG_TRUSTED, "trusted first byte");
    cls(addr_t'(TB + TR_BYTES - 1), REG_TRUSTED, "trusted last byte");
    chk(chk_line == 21'h1fffff, "last line index");
    cls(TB + 32'h12345 * 64, REG_TRUSTED, "trusted middle");
    chk(chk_line == 21'h12345, "line index");
    cls(addr_t'(TB + TR_BYTES), REG_UNTRUSTED, "above trusted");
    cls(MB - 1, REG_UNTRUSTED, "below metadata");
    cls(MB, REG_METADATA, "metadata first byte");
    cls(addr_t'(MB + META_BYTES - 1), REG_METADATA, "metadata last byte");
    cls(addr_t'(MB + META_BYTES), REG_UNTRUSTED, "above metadata");
    // init request pulse
    pulses = 0;
    fork
      wr(2'd3, 32'h5);
      repeat (4) @(posedge clk) #1 if (init_req) pulses++;
    join
    chk(pulses == 1, $sformatf("one init pulse, got %0d", pulses));
    // lock
    wr(2'd3, 32'h3);
    chk(locked && enable, "locked and enabled");
    wr(2'd0, 32'h1000_0000);
    wr(2'd3, 32'h0);
    cfg_addr = 2'd0; #1 chk(cfg_rdata == TB, "base frozen by lock");
    chk(locked && enable, "lock and enable frozen");
    cls(TB, REG_TRUSTED, "still trusted after lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
