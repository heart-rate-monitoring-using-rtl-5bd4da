// AHB-Lite master model for the testbenches: issues single or back-to-back
// (pipelined) transfers and returns read data and the response.
//
// All tasks start and end just after a falling clock edge. Signals are driven
// at falling edges and HREADY is looked at before the next rising edge, so
// the model never races the design's flops. hready is the bus HREADY seen by
// the master; error counts ERROR responses for the caller's statistics.
module ahb_bfm
  import ahb_pkg::*;
(
  input  logic     clk,
  output ahb_req_t req,
  input  ahb_rsp_t rsp
);

  int unsigned errors_seen = 0;

  initial begin
    req = '0;
    req.htrans = HTRANS_IDLE;
    req.hprot  = 4'b0011;
  end

  function automatic logic [31:0] lane_data(logic [31:0] addr, logic [31:0] data, logic [2:0] size);
    // Place a byte or halfword on its little-endian lanes.
    unique case (size)
      3'b000:  return {4{data[7:0]}};
      3'b001:  return {2{data[15:0]}};
      default: return data;
    endcase
  endfunction

  task automatic addr_phase(input logic wr, input logic [31:0] addr, input logic [2:0] size);
    req.haddr  = addr;
    req.htrans = HTRANS_NONSEQ;
    req.hwrite = wr;
    req.hsize  = size;
    req.hburst = 3'b000;
  endtask

  // Waits until HREADY is high before a rising edge, then steps over that edge.
  task automatic step_when_ready();
    while (!rsp.hready) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic xfer(input logic wr, input logic [31:0] addr, input logic [31:0] wdata,
                      input logic [2:0] size, output logic [31:0] rdata, output logic resp);
    addr_phase(wr, addr, size);
    step_when_ready();
    req.htrans = HTRANS_IDLE;
    req.hwdata = lane_data(addr, wdata, size);
    while (!rsp.hready) @(negedge clk);
    rdata = rsp.hrdata;
    resp  = rsp.hresp;
    if (resp) errors_seen++;
    @(negedge clk);
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data, input logic [2:0] size = 3'b010);
    logic [31:0] d;
    logic r;
    xfer(1'b1, addr, data, size, d, r);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data, input logic [2:0] size = 3'b010);
    logic r;
    xfer(1'b0, addr, 32'd0, size, data, r);
  endtask

  // Two transfers back to back: the second address phase overlaps the
  // first data phase.
  task automatic pair(input logic wr0, input logic [31:0] a0, input logic [31:0] d0, input logic [2:0] s0,
                      input logic wr1, input logic [31:0] a1, input logic [31:0] d1, input logic [2:0] s1,
                      output logic [31:0] r0, output logic [31:0] r1);
    addr_phase(wr0, a0, s0);
    step_when_ready();
    req.hwdata = lane_data(a0, d0, s0);
    addr_phase(wr1, a1, s1);
    while (!rsp.hready) @(negedge clk);
    r0 = rsp.hrdata;
    @(negedge clk);
    req.htrans = HTRANS_IDLE;
    req.hwdata = lane_data(a1, d1, s1);
    while (!rsp.hready) @(negedge clk);
    r1 = rsp.hrdata;
    @(negedge clk);
  endtask

endmodule
