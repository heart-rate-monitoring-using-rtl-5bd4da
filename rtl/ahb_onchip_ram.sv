// On-chip memory of the heart-rate SoC: 16 KB of single-port RAM on AHB-Lite,
// holding the processor's vector table, program and data.
//
// Zero wait states. The RAM is read synchronously: for a read the word is
// fetched at the clock edge that ends the address phase, so it is on HRDATA
// throughout the data phase. A write registers its address and byte lanes in
// the address phase and writes HWDATA into the array at the end of the data
// phase. When the next transfer is a read of the same word, its fetch happens
// at that same edge and would see the old contents, so the written bytes are
// captured and merged into the read data (write-to-read bypass).
//
// Byte, halfword and word transfers are supported through byte-lane enables
// (little-endian lanes). The size (16 KB) follows the system description;
// the timing, bypass and optional $readmemh image (INIT_FILE, 32-bit words,
// word 0 at address 0) are this design's choices.
module ahb_onchip_ram
  import ahb_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 16384,
  parameter string       INIT_FILE = ""
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_req_t req,
  input  logic     hsel,
  input  logic     hready,
  output ahb_rsp_t rsp
);

  localparam int unsigned WORDS = MEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  // Byte lanes of a transfer, from HSIZE and the low address bits.
  function automatic logic [3:0] lanes(logic [2:0] size, logic [1:0] a);
    unique case (size)
      3'b000:  return 4'b0001 << a;
      3'b001:  return a[1] ? 4'b1100 : 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

  logic          take;           // transfer accepted this cycle
  logic [AW-1:0] word_addr;
  logic          wr_pend;        // data phase of a write
  logic [AW-1:0] wr_addr;
  logic [3:0]    wr_be;
  logic [31:0]   rd_word;        // word fetched at end of address phase
  logic [3:0]    byp_be;         // lanes of rd_word replaced by the bypass
  logic [31:0]   byp_data;

  assign take      = hsel && hready && is_active(req.htrans);
  assign word_addr = req.haddr[AW+1:2];

  // Array: write at the end of the write's data phase.
  always_ff @(posedge clk) begin
    if (wr_pend)
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) mem[wr_addr][8*b +: 8] <= req.hwdata[8*b +: 8];
    if (take && !req.hwrite)
      rd_word <= mem[word_addr];
  end

  // Control and bypass registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend  <= 1'b0;
      wr_addr  <= '0;
      wr_be    <= '0;
      byp_be   <= '0;
      byp_data <= '0;
    end else begin
      if (hready) begin
        wr_pend <= take && req.hwrite;
        wr_addr <= word_addr;
        wr_be   <= lanes(req.hsize, req.haddr[1:0]);
      end
      if (take && !req.hwrite) begin
        byp_be   <= (wr_pend && wr_addr == word_addr) ? wr_be : 4'b0000;
        byp_data <= req.hwdata;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < 4; b++)
      rsp.hrdata[8*b +: 8] = byp_be[b] ? byp_data[8*b +: 8] : rd_word[8*b +: 8];
    rsp.hready = 1'b1;
    rsp.hresp  = 1'b0;
  end

endmodule
