// Shared types and constants of the AHB-to-APB bridge.
//
// Holds the AMBA AHB encodings the bridge decodes (HTRANS, HSIZE, HRESP),
// the state type of the bridge controller and the request record that the
// AHB side hands to the APB side when it accepts a transfer. The encodings
// are those of the AMBA AHB bus; the state list and the request record are
// this design's own.
package ahb2apb_pkg;

  localparam int unsigned BUS_ADDR_W = 32;
  localparam int unsigned BUS_DATA_W = 32;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HSIZE_BYTE  = 3'b000,
    HSIZE_HALF  = 3'b001,
    HSIZE_WORD  = 3'b010
  } hsize_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Bridge controller states.
  //   IDLE   : no transfer, HREADYOUT high
  //   WDATA  : write accepted, HWDATA being captured
  //   SETUP  : APB setup phase (select high, enable low)
  //   ACCESS : APB access phase, waits for the peripheral's acknowledge
  //   DONE   : transfer finished OKAY, HREADYOUT high
  //   ERR1   : first cycle of the two-cycle ERROR/RETRY response
  //   ERR2   : second cycle of it, HREADYOUT high
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_WDATA  = 3'd1,
    ST_SETUP  = 3'd2,
    ST_ACCESS = 3'd3,
    ST_DONE   = 3'd4,
    ST_ERR1   = 3'd5,
    ST_ERR2   = 3'd6
  } bridge_state_e;

  // What the AHB side records of an accepted address phase.
  typedef struct packed {
    logic [BUS_ADDR_W-1:0] addr;
    logic              write;
    logic [1:0]        size;
    logic [2:0]        burst;
    logic [3:0]        prot;
    logic [3:0]        byte_en;
  } apb_req_t;

  // Byte lanes touched by a transfer on the 32-bit little-endian bus.
  function automatic logic [3:0] lane_enables(input logic [1:0] addr_lo,
                                              input logic [2:0] size);
    logic [3:0] be;
    unique case (size)
      HSIZE_BYTE: be = 4'b0001 << addr_lo;
      HSIZE_HALF: be = addr_lo[1] ? 4'b1100 : 4'b0011;
      default:    be = 4'b1111;
    endcase
    return be;
  endfunction

endpackage
