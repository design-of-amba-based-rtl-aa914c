// APB master side of the AHB-to-APB bridge.
//
// Registers the request that the AHB side accepts (`accept`, one cycle)
// onto the APB address and control outputs: paddr, pwrite, pread (the
// inverse of pwrite), psize, pburst, pbyte_en and pprot. `wdata_load`
// registers the AHB write data onto pwdata one cycle before the setup
// phase. Because a new request is accepted only while no APB transfer runs,
// all of these are stable from the setup phase to the end of the access
// phase; between transfers they keep their last value, and reset clears
// them. slv_ahb_sel (PSEL) and penable come straight from the controller's
// state register, and the acknowledge, error flag and read data of the
// peripheral are passed back to it.
//
// The signal set is the bridge's APB port list, with penable added from the
// APB signal list; registering and holding the outputs is this design's
// choice.
module apb_master_if
  import ahb2apb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // from the AHB side and the controller
  input  logic              accept,
  input  apb_req_t          req,
  input  logic              wdata_load,
  input  logic [BUS_DATA_W-1:0] hwdata,
  input  logic              apb_sel,
  input  logic              apb_enable,
  // APB outputs
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
  // APB inputs
  input  logic              slv_ahb_ack,
  input  logic [BUS_DATA_W-1:0] slv_ahb_rdata,
  input  logic              xfer_error_access,
  // back to the controller and the AHB side
  output logic              apb_ack,
  output logic              apb_err,
  output logic [BUS_DATA_W-1:0] apb_rdata
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      paddr    <= '0;
      pwrite   <= 1'b0;
      pread    <= 1'b0;
      psize    <= '0;
      pburst   <= '0;
      pbyte_en <= '0;
      pprot    <= '0;
      pwdata   <= '0;
    end else begin
      if (accept) begin
        paddr    <= req.addr;
        pwrite   <= req.write;
        pread    <= !req.write;
        psize    <= req.size;
        pburst   <= req.burst;
        pbyte_en <= req.byte_en;
        pprot    <= req.prot;
      end
      if (wdata_load) pwdata <= hwdata;
    end
  end

  assign slv_ahb_sel = apb_sel;
  assign penable     = apb_enable;

  // Only an access phase can be acknowledged.
  assign apb_ack   = apb_sel && apb_enable && slv_ahb_ack;
  assign apb_err   = xfer_error_access;
  assign apb_rdata = slv_ahb_rdata;

  // APB: address and control stay stable while the transfer is selected.
  a_stable_in_access: assert property (@(posedge clk) disable iff (!rst_n)
    (apb_sel && !apb_enable) |=> $stable({paddr, pwrite, pwdata, pbyte_en}));
  // APB: enable is only high while selected.
  a_enable_needs_sel: assert property (@(posedge clk) disable iff (!rst_n)
    apb_enable |-> apb_sel);

endmodule
