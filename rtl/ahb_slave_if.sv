// AHB slave side of the AHB-to-APB bridge.
//
// Watches the AHB address phase and raises `accept` for one cycle when a
// transfer is addressed to the bridge: HSEL high, HTRANS NONSEQ or SEQ, the
// bus HREADY high and the bridge itself ready (`fsm_ready`). IDLE and BUSY
// cycles are ignored. Alongside `accept` it presents the request record
// (address, direction, size, burst, protection and the byte-lane enables
// worked out from HADDR[1:0] and HSIZE), which the APB side registers in the
// same edge.
//
// On the return path it holds the read data: `rdata_load` (from the
// controller, in the cycle the peripheral acknowledges a read) registers
// PRDATA, and the value is on HRDATA from the next cycle, which is the cycle
// HREADYOUT goes high. HREADYOUT and HRESP come from the controller.
//
// The signal names and widths follow the bridge's AHB port list; the
// acceptance rule, the lane table and the registered read data are this
// design's choices. Only byte, halfword and word transfers are supported.
module ahb_slave_if
  import ahb2apb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AHB slave inputs
  input  logic              hsel,
  input  logic [BUS_ADDR_W-1:0] haddr,
  input  logic [1:0]        htrans,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic [2:0]        hburst,
  input  logic [3:0]        hprot,
  input  logic              hready_in,
  // AHB slave outputs
  output logic [BUS_DATA_W-1:0] hrdata,
  output logic              hready_out,
  output logic [1:0]        hresp,
  // to and from the controller / APB side
  input  logic              fsm_ready,
  input  logic [1:0]        fsm_resp,
  input  logic              rdata_load,
  input  logic [BUS_DATA_W-1:0] apb_rdata,
  output logic              accept,
  output apb_req_t          req
);

  assign accept = hsel && hready_in && fsm_ready &&
                  (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);

  always_comb begin
    req         = '0;
    req.addr    = haddr;
    req.write   = hwrite;
    req.size    = hsize[1:0];
    req.burst   = hburst;
    req.prot    = hprot;
    req.byte_en = lane_enables(haddr[1:0], hsize);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          hrdata <= '0;
    else if (rdata_load) hrdata <= apb_rdata;
  end

  assign hready_out = fsm_ready;
  assign hresp      = fsm_resp;

  // The 32-bit bridge takes byte, halfword and word transfers only.
  a_size_supported: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> hsize <= HSIZE_WORD);

endmodule
