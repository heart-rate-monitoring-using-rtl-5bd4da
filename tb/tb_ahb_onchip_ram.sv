// Self-checking testbench for ahb_onchip_ram.
//
// Checks the $readmemh image, word/halfword/byte writes and reads against a
// reference array kept in the testbench, the write-to-read bypass (a read
// of the word written by the transfer just before it, issued back to back),
// zero-wait-state timing, and a run of random transfers. A reduced size is
// used to keep the random addresses dense.
module tb_ahb_onchip_ram;
  import ahb_pkg::*;

  localparam int unsigned BYTES = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  ahb_req_t req;
  ahb_rsp_t rsp;

  ahb_onchip_ram #(.MEM_BYTES(BYTES), .INIT_FILE("tb/ram_init.hex")) dut (
    .clk, .rst_n, .req, .hsel(1'b1), .hready(rsp.hready), .rsp);
  ahb_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [BYTES/4];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] ref_read(logic [31:0] a, logic [2:0] size);
    logic [31:0] w = ref_mem[a[$clog2(BYTES)-1:2]];
    unique case (size)
      3'b000:  return {24'd0, w[8*a[1:0] +: 8]};
      3'b001:  return {16'd0, w[16*a[1] +: 16]};
      default: return w;
    endcase
  endfunction

  task automatic ref_write(logic [31:0] a, logic [31:0] d, logic [2:0] size);
    int unsigned i = a[$clog2(BYTES)-1:2];
    unique case (size)
      3'b000:  ref_mem[i][8*a[1:0] +: 8] = d[7:0];
      3'b001:  ref_mem[i][16*a[1] +: 16] = d[15:0];
      default: ref_mem[i] = d;
    endcase
  endtask

  // Extract the addressed lanes from a bus word.
  function automatic logic [31:0] pick(logic [31:0] w, logic [31:0] a, logic [2:0] size);
    unique case (size)
      3'b000:  return {24'd0, w[8*a[1:0] +: 8]};
      3'b001:  return {16'd0, w[16*a[1] +: 16]};
      default: return w;
    endcase
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, r0, r1, a;
    logic [2:0]  sz;
    int unsigned t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Initial image.
    bfm.read(32'h0, d);  check("init word 0", d, 32'h12345678);
    bfm.read(32'h4, d);  check("init word 1", d, 32'hcafef00d);
    bfm.read(32'hC, d);  check("init word 3", d, 32'ha5a55a5a);
    bfm.read(32'h5, d, 3'b000); check("init byte 5", pick(d, 32'h5, 3'b000), 32'hf0);

    for (int i = 0; i < BYTES/4; i++) begin
      bfm.write(32'(4*i), 32'(i) * 32'h01010101 ^ 32'h5a000000);
      ref_mem[i] = 32'(i) * 32'h01010101 ^ 32'h5a000000;
    end
    for (int i = 0; i < BYTES/4; i += 37) begin
      bfm.read(32'(4*i), d);
      check($sformatf("word %0d", i), d, ref_mem[i]);
    end

    // Sub-word writes.
    bfm.write(32'h101, 32'h000000ab, 3'b000); ref_write(32'h101, 32'hab, 3'b000);
    bfm.write(32'h106, 32'h0000beef, 3'b001); ref_write(32'h106, 32'hbeef, 3'b001);
    bfm.read(32'h100, d); check("byte write lane 1", d, ref_mem[32'h100 >> 2]);
    bfm.read(32'h104, d); check("half write upper", d, ref_mem[32'h104 >> 2]);
    bfm.read(32'h106, d, 3'b001); check("half read", pick(d, 32'h106, 3'b001), 32'hbeef);

    // Zero wait states: a read completes in two cycles.
    t0 = $time;
    bfm.read(32'h40, d);
    checks++;
    if (($time - t0) != 2 * 20) begin
      failures++;
      $display("FAIL latency %0d", $time - t0);
    end

    // Write then read of the same word back to back: bypass.
    bfm.pair(1'b1, 32'h200, 32'hdeadbeef, 3'b010, 1'b0, 32'h200, 32'h0, 3'b010, r0, r1);
    ref_write(32'h200, 32'hdeadbeef, 3'b010);
    check("bypass word", r1, 32'hdeadbeef);
    bfm.pair(1'b1, 32'h202, 32'h00001234, 3'b001, 1'b0, 32'h200, 32'h0, 3'b010, r0, r1);
    ref_write(32'h202, 32'h1234, 3'b001);
    check("bypass half merge", r1, 32'h1234beef);
    bfm.pair(1'b1, 32'h204, 32'h11111111, 3'b010, 1'b0, 32'h208, 32'h0, 3'b010, r0, r1);
    ref_write(32'h204, 32'h11111111, 3'b010);
    check("no bypass other word", r1, ref_mem[32'h208 >> 2]);

    // Random traffic, singles and pairs.
    for (int n = 0; n < 400; n++) begin
      sz = 3'($urandom_range(0, 2));
      a  = 32'($urandom_range(0, BYTES - 1));
      a  = (sz == 3'b010) ? {a[31:2], 2'b00} : (sz == 3'b001) ? {a[31:1], 1'b0} : a;
      d  = $urandom;
      if ($urandom_range(0, 1)) begin
        bfm.write(a, d, sz);
        ref_write(a, d, sz);
      end else if ($urandom_range(0, 1)) begin
        bfm.read(a, r0, sz);
        check("random read", pick(r0, a, sz), ref_read(a, sz));
      end else begin
        bfm.pair(1'b1, a, d, sz, 1'b0, {a[31:2], 2'b00}, 32'h0, 3'b010, r0, r1);
        ref_write(a, d, sz);
        check("random bypass", r1, ref_read({a[31:2], 2'b00}, 3'b010));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
