// AHB-to-APB bridge, top level.
//
// The bridge is an AHB slave towards the high-speed system bus and an APB
// master towards the low-speed peripheral bus. Each AHB transfer that
// selects it becomes exactly one APB transfer: the AHB side accepts the
// address phase, the controller holds the AHB master with HREADYOUT low,
// the APB side runs a setup phase and an access phase that lasts until the
// peripheral acknowledges, and the read data or an error response is then
// returned to the AHB master.
//
// Three blocks are wired here, as in the bridge's block diagram: the AHB
// slave interface (ahb_slave_if), the bridge controller (bridge_fsm) and the
// APB master interface (apb_master_if). Both buses run on ahb_clk and reset
// with ahb_reset_n (asynchronous, active low).
//
// Timing with a peripheral that acknowledges at once: a read costs 3 cycles
// (setup, access, done) and a write 4 (plus one cycle to capture HWDATA);
// each cycle the peripheral holds slv_ahb_ack low adds one AHB wait state.
// Bursts (INCR, WRAP) are handled one beat at a time, HBURST being passed to
// pburst. A peripheral error (xfer_error_access with slv_ahb_ack) returns
// the two-cycle ERROR response, or RETRY when retry_enable is high.
//
// The port names follow the bridge's interface figure; penable is added from
// the APB signal list. The single clock, the cycle counts and the error
// handling are this design's choices.
module ahb2apb_top
  import ahb2apb_pkg::*;
(
  input  logic              ahb_clk,
  input  logic              ahb_reset_n,
  // AHB slave port
  input  logic              ahb_slv_hsel_i,
  input  logic [BUS_ADDR_W-1:0] ahb_slv_haddr_i,
  input  logic [1:0]        ahb_slv_htrans_i,
  input  logic              ahb_slv_hwrite_i,
  input  logic [2:0]        ahb_slv_hsize_i,
  input  logic [2:0]        ahb_slv_hburst_i,
  input  logic [3:0]        ahb_slv_hprot_i,
  input  logic [BUS_DATA_W-1:0] ahb_slv_hwdata_i,
  input  logic              ahb_slv_hready_i,
  input  logic              retry_enable,
  output logic [BUS_DATA_W-1:0] slv_ahb_hrdata_o,
  output logic              slv_ahb_hready_o,
  output logic [1:0]        slv_ahb_hresp_o,
  // APB master port
  output logic [BUS_ADDR_W-1:0] paddr,
  output logic              pwrite,
  output logic              pread,
  output logic [BUS_DATA_W-1:0] pwdata,
  output logic [1:0]        psize,
  output logic [2:0]        pburst,
  output logic [3:0]        pbyte_en,
  output logic [3:0]        pprot,
  output logic              slv_ahb_sel,
  output logic              penable,
  input  logic              slv_ahb_ack,
  input  logic [BUS_DATA_W-1:0] slv_ahb_rdata,
  input  logic              xfer_error_access
);

  logic          accept;
  apb_req_t      req;
  logic          fsm_ready;
  logic [1:0]    fsm_resp;
  logic          wdata_load, rdata_load;
  logic          apb_sel, apb_enable;
  logic          apb_ack, apb_err;
  logic [BUS_DATA_W-1:0] apb_rdata;

  ahb_slave_if u_ahb_slave_if (
    .clk        (ahb_clk),
    .rst_n      (ahb_reset_n),
    .hsel       (ahb_slv_hsel_i),
    .haddr      (ahb_slv_haddr_i),
    .htrans     (ahb_slv_htrans_i),
    .hwrite     (ahb_slv_hwrite_i),
    .hsize      (ahb_slv_hsize_i),
    .hburst     (ahb_slv_hburst_i),
    .hprot      (ahb_slv_hprot_i),
    .hready_in  (ahb_slv_hready_i),
    .hrdata     (slv_ahb_hrdata_o),
    .hready_out (slv_ahb_hready_o),
    .hresp      (slv_ahb_hresp_o),
    .fsm_ready  (fsm_ready),
    .fsm_resp   (fsm_resp),
    .rdata_load (rdata_load),
    .apb_rdata  (apb_rdata),
    .accept     (accept),
    .req        (req)
  );

  bridge_fsm u_bridge_fsm (
    .clk          (ahb_clk),
    .rst_n        (ahb_reset_n),
    .accept       (accept),
    .accept_write (req.write),
    .apb_ack      (apb_ack),
    .apb_err      (apb_err),
    .retry_enable (retry_enable),
    .ready        (fsm_ready),
    .resp         (fsm_resp),
    .wdata_load   (wdata_load),
    .rdata_load   (rdata_load),
    .apb_sel      (apb_sel),
    .apb_enable   (apb_enable)
  );

  apb_master_if u_apb_master_if (
    .clk               (ahb_clk),
    .rst_n             (ahb_reset_n),
    .accept            (accept),
    .req               (req),
    .wdata_load        (wdata_load),
    .hwdata            (ahb_slv_hwdata_i),
    .apb_sel           (apb_sel),
    .apb_enable        (apb_enable),
    .paddr             (paddr),
    .pwrite            (pwrite),
    .pread             (pread),
    .pwdata            (pwdata),
    .psize             (psize),
    .pburst            (pburst),
    .pbyte_en          (pbyte_en),
    .pprot             (pprot),
    .slv_ahb_sel       (slv_ahb_sel),
    .penable           (penable),
    .slv_ahb_ack       (slv_ahb_ack),
    .slv_ahb_rdata     (slv_ahb_rdata),
    .xfer_error_access (xfer_error_access),
    .apb_ack           (apb_ack),
    .apb_err           (apb_err),
    .apb_rdata         (apb_rdata)
  );

endmodule
