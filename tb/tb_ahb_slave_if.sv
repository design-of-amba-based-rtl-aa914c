// Testbench of ahb_slave_if, the AHB side of the bridge.
//
// Drives random AHB address-phase signals and controller inputs each cycle
// and checks: `accept` only for NONSEQ/SEQ with HSEL, bus HREADY and the
// controller ready (IDLE and BUSY never accepted); the request record
// copies address, direction, size, burst and protection; the byte-lane
// enables against an explicit table; HREADYOUT/HRESP follow the controller;
// HRDATA takes PRDATA one cycle after `rdata_load` and holds otherwise.
// A directed sweep first covers every address offset and size.
module tb_ahb_slave_if;
  import ahb2apb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        hsel, hwrite, hready_in, fsm_ready, rdata_load, accept;
  logic [31:0] haddr, hrdata, apb_rdata;
  logic [1:0]  htrans, hresp, fsm_resp;
  logic [2:0]  hsize, hburst;
  logic [3:0]  hprot;
  logic        hready_out;
  apb_req_t    req;

  ahb_slave_if dut (
    .clk(clk), .rst_n(rst_n), .hsel(hsel), .haddr(haddr), .htrans(htrans),
    .hwrite(hwrite), .hsize(hsize), .hburst(hburst), .hprot(hprot),
    .hready_in(hready_in), .hrdata(hrdata), .hready_out(hready_out), .hresp(hresp),
    .fsm_ready(fsm_ready), .fsm_resp(fsm_resp), .rdata_load(rdata_load),
    .apb_rdata(apb_rdata), .accept(accept), .req(req)
  );

  int checks = 0, failures = 0, n_accept = 0, n_reject = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [3:0] exp_be(input logic [1:0] a, input logic [2:0] s);
    case (s)
      3'd0: case (a) 2'd0: return 4'b0001; 2'd1: return 4'b0010;
                     2'd2: return 4'b0100; default: return 4'b1000; endcase
      3'd1: return (a >= 2) ? 4'b1100 : 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

  task automatic check_comb();
    bit exp_acc = hsel && hready_in && fsm_ready && (htrans == 2'b10 || htrans == 2'b11);
    check(accept == exp_acc, $sformatf("accept=%b sel=%b rdy=%b frdy=%b trans=%b",
                                       accept, hsel, hready_in, fsm_ready, htrans));
    check(req.addr == haddr && req.write == hwrite && req.size == hsize[1:0] &&
          req.burst == hburst && req.prot == hprot, "request fields");
    check(req.byte_en == exp_be(haddr[1:0], hsize),
          $sformatf("byte_en %b for offset %0d size %0d", req.byte_en, haddr[1:0], hsize));
    check(hready_out == fsm_ready && hresp == fsm_resp, "HREADYOUT/HRESP");
    if (exp_acc) n_accept++; else n_reject++;
  endtask

  logic [31:0] exp_rdata;

  initial begin
    hsel = 0; hwrite = 0; hready_in = 1; fsm_ready = 1; rdata_load = 0;
    haddr = 0; apb_rdata = 0; htrans = 0; fsm_resp = 0; hsize = 0; hburst = 0; hprot = 0;
    repeat (2) @(posedge clk);
    check(hrdata == 32'h0, "HRDATA after reset");
    rst_n = 1'b1;
    exp_rdata = 32'h0;

    // directed: every offset and size
    for (int s = 0; s < 3; s++)
      for (int a = 0; a < 4; a++) begin
        hsel = 1; htrans = 2'b10; hsize = 3'(s); haddr = 32'h1000 + 32'(a);
        #1 check_comb();
      end

    // random
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      hsel       = 1'($urandom);
      haddr      = $urandom;
      htrans     = 2'($urandom);
      hwrite     = 1'($urandom);
      hsize      = 3'($urandom_range(2, 0));
      hburst     = 3'($urandom);
      hprot      = 4'($urandom);
      hready_in  = ($urandom_range(3, 0) != 0);
      fsm_ready  = ($urandom_range(2, 0) != 0);
      fsm_resp   = 2'($urandom);
      rdata_load = 1'($urandom);
      apb_rdata  = $urandom;
      #1 check_comb();
      @(posedge clk);
      if (rdata_load) exp_rdata = apb_rdata;
      #1 check(hrdata == exp_rdata, $sformatf("HRDATA %h expected %h", hrdata, exp_rdata));
    end

    check(n_accept > 0 && n_reject > 0, "both accepted and rejected cycles");
    $display("accepted=%0d rejected=%0d", n_accept, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
