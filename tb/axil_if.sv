// axil_if: AXI4-Lite bus bundle used by the testbenches.
//
// Carries the five AXI4-Lite channels without WSTRB/PROT (the slave under
// test has none), plus master-side driver tasks and concurrent assertions
// for the handshake rules: once VALID is high it stays high, with a stable
// payload, until READY is seen. The master tasks drive on the falling edge
// and complete on the rising edge at which VALID and READY are both high.
interface axil_if #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32
) (
  input logic clk,
  input logic rstn
);
  logic [ADDR_W-1:0] awaddr;
  logic              awvalid, awready;
  logic [DATA_W-1:0] wdata;
  logic              wvalid, wready;
  logic              bvalid, bready;
  logic [1:0]        bresp;
  logic [ADDR_W-1:0] araddr;
  logic              arvalid, arready;
  logic              rvalid, rready;
  logic [DATA_W-1:0] rdata;
  logic [1:0]        rresp;

  task automatic init_master();
    awvalid = 1'b0; awaddr = '0;
    wvalid  = 1'b0; wdata  = '0;
    arvalid = 1'b0; araddr = '0;
    bready  = 1'b1; rready = 1'b1;
  endtask

  // one beat on the write-address channel after `gap` idle cycles
  task automatic send_aw(input logic [ADDR_W-1:0] a, input int gap);
    repeat (gap) @(negedge clk);
    awvalid = 1'b1; awaddr = a;
    while (!awready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    awvalid = 1'b0; awaddr = $urandom;
  endtask

  task automatic send_w(input logic [DATA_W-1:0] d, input int gap);
    repeat (gap) @(negedge clk);
    wvalid = 1'b1; wdata = d;
    while (!wready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    wvalid = 1'b0; wdata = $urandom;
  endtask

  task automatic send_ar(input logic [ADDR_W-1:0] a, input int gap);
    repeat (gap) @(negedge clk);
    arvalid = 1'b1; araddr = a;
    while (!arready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    arvalid = 1'b0; araddr = $urandom;
  endtask

  // handshake rules of both sides
  a_aw_hold: assert property (@(posedge clk) disable iff (!rstn)
    awvalid && !awready |=> awvalid && $stable(awaddr));
  a_w_hold:  assert property (@(posedge clk) disable iff (!rstn)
    wvalid && !wready |=> wvalid && $stable(wdata));
  a_ar_hold: assert property (@(posedge clk) disable iff (!rstn)
    arvalid && !arready |=> arvalid && $stable(araddr));
  a_b_hold:  assert property (@(posedge clk) disable iff (!rstn)
    bvalid && !bready |=> bvalid && $stable(bresp));
  a_r_hold:  assert property (@(posedge clk) disable iff (!rstn)
    rvalid && !rready |=> rvalid && $stable(rdata) && $stable(rresp));
endinterface
