// smrr: secure memory range registers and the address check in front of the
// MPU.
//
// The DRAM is split into a trusted region (encrypted and authenticated), a
// metadata region (tags, counters and the stored levels of the counter tree)
// and everything else, which is untrusted and passed through unchanged. The
// trusted region's base and the metadata region's base are programmable so
// the partitioning can be changed at run time; their sizes follow from the
// LINE_AW parameter (2^LINE_AW lines of 64 bytes, 128 MB by default). Once
// the lock bit is set no register can be written again until reset, which
// keeps the allocation out of reach of software.
//
// Registers (cfg_addr): 0 trusted base, 1 metadata base, 2 IV (low 8 bits),
// 3 control: bit 0 enable protection, bit 1 lock, bit 2 start region
// initialisation (write-only, gives a one-cycle init_req pulse).
// Writes take effect on the next clock edge; reads and the address check are
// combinational. An address in both regions is classed as metadata.
// The register map, lock bit and IV register are this design's choices; the
// three region kinds and the address check come from the MPU's description.
module smrr
  import smarts_pkg::*;
#(
  parameter int unsigned LINE_AW = LINE_AW_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [1:0]        cfg_addr,
  input  logic [31:0]       cfg_wdata,
  output logic [31:0]       cfg_rdata,
  output addr_t             tr_base,
  output addr_t             meta_base,
  output logic [IV_W-1:0]   iv,
  output logic              enable,
  output logic              locked,
  output logic              init_req,
  input  addr_t             chk_addr,
  output region_e           chk_region,
  output logic [LINE_AW-1:0] chk_line
);

  localparam logic [ADDR_W:0] TR_BYTES   = (ADDR_W+1)'(1) << (LINE_AW + 6);
  localparam logic [ADDR_W:0] META_BYTES = (ADDR_W+1)'(meta_lines(LINE_AW)) << 6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tr_base   <= '0;
      meta_base <= '0;
      iv        <= '0;
      enable    <= 1'b0;
      locked    <= 1'b0;
      init_req  <= 1'b0;
    end else begin
      init_req <= 1'b0;
      if (cfg_we && !locked) begin
        unique case (cfg_addr)
          2'd0: tr_base   <= {cfg_wdata[ADDR_W-1:6], 6'd0};
          2'd1: meta_base <= {cfg_wdata[ADDR_W-1:6], 6'd0};
          2'd2: iv        <= cfg_wdata[IV_W-1:0];
          2'd3: begin
            enable   <= cfg_wdata[0];
            locked   <= cfg_wdata[1];
            init_req <= cfg_wdata[2];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (cfg_addr)
      2'd0:    cfg_rdata = tr_base;
      2'd1:    cfg_rdata = meta_base;
      2'd2:    cfg_rdata = 32'(iv);
      default: cfg_rdata = {30'd0, locked, enable};
    endcase
  end

  // Address check: offsets are taken one bit wider; an address below a base
  // gives a negative offset, which compares as too large.
  logic [ADDR_W:0] tr_off, meta_off;
  assign tr_off   = {1'b0, chk_addr} - {1'b0, tr_base};
  assign meta_off = {1'b0, chk_addr} - {1'b0, meta_base};
  assign chk_line = tr_off[LINE_AW+5:6];

  always_comb begin
    if (enable && meta_off < META_BYTES)
      chk_region = REG_METADATA;
    else if (enable && tr_off < TR_BYTES)
      chk_region = REG_TRUSTED;
    else
      chk_region = REG_UNTRUSTED;
  end

endmodule
