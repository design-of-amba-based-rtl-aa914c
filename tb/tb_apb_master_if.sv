// Testbench of apb_master_if, the APB side of the bridge.
//
// Runs random APB transfers through the block the way the controller does:
// accept a request (one cycle), for writes load the AHB write data, then a
// setup cycle (sel) and an access phase (sel and enable) of random length.
// Checks that paddr, pwrite, pread, psize, pburst, pbyte_en and pprot hold
// the accepted request and pwdata the loaded data through the transfer and
// after it, that slv_ahb_sel/penable follow the controller, that the
// acknowledge is passed on only in the access phase, and that the error flag
// and read data are passed back.
module tb_apb_master_if;
  import ahb2apb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        accept, wdata_load, apb_sel, apb_enable;
  apb_req_t    req;
  logic [31:0] hwdata, paddr, pwdata, slv_ahb_rdata, apb_rdata;
  logic        pwrite, pread, slv_ahb_sel, penable, slv_ahb_ack, xfer_error_access;
  logic        apb_ack, apb_err;
  logic [1:0]  psize;
  logic [2:0]  pburst;
  logic [3:0]  pbyte_en, pprot;

  apb_master_if dut (
    .clk(clk), .rst_n(rst_n), .accept(accept), .req(req), .wdata_load(wdata_load),
    .hwdata(hwdata), .apb_sel(apb_sel), .apb_enable(apb_enable),
    .paddr(paddr), .pwrite(pwrite), .pread(pread), .pwdata(pwdata), .psize(psize),
    .pburst(pburst), .pbyte_en(pbyte_en), .pprot(pprot), .slv_ahb_sel(slv_ahb_sel),
    .penable(penable), .slv_ahb_ack(slv_ahb_ack), .slv_ahb_rdata(slv_ahb_rdata),
    .xfer_error_access(xfer_error_access), .apb_ack(apb_ack), .apb_err(apb_err),
    .apb_rdata(apb_rdata)
  );

  int checks = 0, failures = 0, n_xfer = 0, n_wr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  apb_req_t    held;
  logic [31:0] held_wdata;

  task automatic check_held(input string where);
    check(paddr == held.addr && pwrite == held.write && pread == !held.write &&
          psize == held.size && pburst == held.burst && pbyte_en == held.byte_en &&
          pprot == held.prot, {where, ": held request"});
    check(pwdata == held_wdata, $sformatf("%s: pwdata %h expected %h", where, pwdata, held_wdata));
    check(slv_ahb_sel == apb_sel && penable == apb_enable, {where, ": sel/enable"});
    check(apb_ack == (apb_sel && apb_enable && slv_ahb_ack), {where, ": ack gating"});
    check(apb_err == xfer_error_access && apb_rdata == slv_ahb_rdata, {where, ": return path"});
  endtask

  task automatic randomize_return();
    slv_ahb_ack = 1'($urandom); xfer_error_access = 1'($urandom); slv_ahb_rdata = $urandom;
  endtask

  initial begin
    accept = 0; wdata_load = 0; apb_sel = 0; apb_enable = 0; req = '0; hwdata = 0;
    slv_ahb_ack = 0; xfer_error_access = 0; slv_ahb_rdata = 0;
    held = '0; held_wdata = 0;
    repeat (2) @(posedge clk);
    #1 check(paddr == 0 && !pwrite && !pread && psize == 0 && pburst == 0 &&
             pbyte_en == 0 && pprot == 0 && pwdata == 0, "outputs cleared by reset");
    rst_n = 1'b1;

    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      req = apb_req_t'({$urandom, $urandom});
      accept = 1;
      hwdata = $urandom;                  // not loaded by accept
      @(negedge clk);
      accept = 0;
      held = req;
      req = apb_req_t'({$urandom, $urandom}); // must not be taken now
      check_held("after accept");
      if (held.write) begin
        hwdata = $urandom; wdata_load = 1;
        @(negedge clk);
        wdata_load = 0; held_wdata = hwdata; hwdata = $urandom;
        n_wr++;
      end
      apb_sel = 1; randomize_return();
      #1 check_held("setup");
      @(negedge clk);
      apb_enable = 1;
      repeat ($urandom_range(3, 0)) begin
        randomize_return(); slv_ahb_ack = 0;
        #1 check_held("access wait");
        @(negedge clk);
      end
      randomize_return(); slv_ahb_ack = 1;
      #1 check_held("access ack");
      @(negedge clk);
      apb_sel = 0; apb_enable = 0; randomize_return();
      #1 check_held("after transfer");
      n_xfer++;
    end

    check(n_xfer > 0 && n_wr > 0 && n_wr < n_xfer, "reads and writes");
    $display("transfers=%0d writes=%0d", n_xfer, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
