// Testbench of bridge_fsm, the bridge controller.
//
// Plays random transfers into the controller: a read or write is accepted
// whenever it reports ready and the testbench chooses to; the peripheral
// acknowledge comes after a random number of access cycles, sometimes with
// the error flag, and retry_enable is random. For each transfer the
// testbench checks the cycle-by-cycle outputs against the expected phase
// list it builds itself:
//   write: WDATA(wdata_load) SETUP(sel) ACCESS(sel,enable)... then done
//   read : SETUP ACCESS... (rdata_load with the acknowledge) then done
//   done : ready with OKAY, or two cycles of ERROR/RETRY, the first not ready.
// It also checks the zero-wait cost: 3 cycles for a read, 4 for a write.
module tb_bridge_fsm;
  import ahb2apb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       accept, accept_write, apb_ack, apb_err, retry_enable;
  logic       ready, wdata_load, rdata_load, apb_sel, apb_enable;
  logic [1:0] resp;

  bridge_fsm dut (
    .clk(clk), .rst_n(rst_n), .accept(accept), .accept_write(accept_write),
    .apb_ack(apb_ack), .apb_err(apb_err), .retry_enable(retry_enable),
    .ready(ready), .resp(resp), .wdata_load(wdata_load), .rdata_load(rdata_load),
    .apb_sel(apb_sel), .apb_enable(apb_enable)
  );

  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_wait = 0, n_err = 0, n_retry = 0, n_b2b = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // expected outputs of one cycle: {ready, sel, enable, wdata_load}
  task automatic expect_cycle(input bit rdy, input bit sel, input bit en, input bit wl,
                              input logic [1:0] rsp, input string where);
    check(ready == rdy && apb_sel == sel && apb_enable == en && wdata_load == wl && resp == rsp,
          $sformatf("%s: ready=%b sel=%b en=%b wl=%b resp=%0d", where, ready, apb_sel,
                    apb_enable, wdata_load, resp));
  endtask

  initial begin
    bit         wr, er, rt;
    int         waits, cycles;
    accept = 0; accept_write = 0; apb_ack = 0; apb_err = 0; retry_enable = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_cycle(1, 0, 0, 0, HRESP_OKAY, "idle after reset");

    for (int k = 0; k < 400; k++) begin
      // maybe some idle cycles (ready stays high, OKAY)
      if ($urandom_range(2, 0) == 0) begin
        accept = 0;
        @(negedge clk);
        expect_cycle(1, 0, 0, 0, HRESP_OKAY, "idle");
      end else n_b2b++;
      wr = 1'($urandom); er = ($urandom_range(7, 0) == 0); rt = 1'($urandom);
      waits = (k < 20) ? 0 : $urandom_range(3, 0);
      accept = 1; accept_write = wr; retry_enable = rt;
      check(ready, "ready when accepting");
      @(negedge clk);
      accept = 0; accept_write = 1'($urandom);   // must be ignored now
      cycles = 1;
      if (wr) begin
        expect_cycle(0, 0, 0, 1, HRESP_OKAY, "wdata");
        @(negedge clk); cycles++;
      end
      expect_cycle(0, 1, 0, 0, HRESP_OKAY, "setup");
      apb_ack = 1'($urandom); apb_err = 1'($urandom); // ignored outside access
      check(!rdata_load, "rdata_load outside access");
      @(negedge clk); cycles++;
      for (int w = 0; w < waits; w++) begin
        apb_ack = 0; apb_err = 1'($urandom);
        #1 expect_cycle(0, 1, 1, 0, HRESP_OKAY, "access wait");
        check(!rdata_load, "rdata_load while waiting");
        n_wait++;
        @(negedge clk); cycles++;
      end
      apb_ack = 1; apb_err = er;
      #1 expect_cycle(0, 1, 1, 0, HRESP_OKAY, "access ack");
      check(rdata_load == !wr, "rdata_load with read acknowledge");
      @(negedge clk); cycles++;
      apb_ack = 0; apb_err = 0;
      if (er) begin
        expect_cycle(0, 0, 0, 0, rt ? HRESP_RETRY : HRESP_ERROR, "error 1");
        retry_enable = 1'($urandom);              // latched already
        @(negedge clk); cycles++;
        expect_cycle(1, 0, 0, 0, rt ? HRESP_RETRY : HRESP_ERROR, "error 2");
        if (rt) n_retry++; else n_err++;
      end else begin
        expect_cycle(1, 0, 0, 0, HRESP_OKAY, "done");
      end
      if (wr) n_write++; else n_read++;
      check(cycles == (wr ? 4 : 3) + waits + (er ? 1 : 0),
            $sformatf("transfer took %0d cycles", cycles));
    end

    check(n_read > 0 && n_write > 0 && n_wait > 0 && n_err > 0 && n_retry > 0 && n_b2b > 0,
          "all cases reached");
    $display("reads=%0d writes=%0d waits=%0d errors=%0d retries=%0d back_to_back=%0d",
             n_read, n_write, n_wait, n_err, n_retry, n_b2b);
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
