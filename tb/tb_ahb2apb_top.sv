// End-to-end testbench of the AHB-to-APB bridge at its default sizes.
//
// A pipelined AHB master (address phase of one transfer overlapping the
// data phase of the one before) plays lists of transfers into the bridge;
// apb_mem_model answers on the APB side. The testbench checks, with its own
// reference memory and its own byte-lane table:
//   - every accepted AHB transfer gives exactly one APB transfer, in order,
//     with the right address, direction, pread, size, burst, protection,
//     byte enables and write data;
//   - read data returned on HRDATA matches the reference memory;
//   - the AHB cycle count of each transfer: 3 for a read and 4 for a write
//     with no wait states, plus one per peripheral wait cycle, plus one for
//     the two-cycle error response;
//   - APB setup/access sequencing (PSEL before PENABLE);
//   - ERROR (retry_enable low) and RETRY (retry_enable high) responses and
//     that a failed write leaves the memory unchanged.
// Phases: the byte-wide INCR read burst at 0x101..0x104 of the bridge's
// waveform figure, single transfers, INCR4 bursts with a BUSY cycle,
// back-to-back mixed transfers, a long random run with wait states, a
// shared bus where a second slave holds the bus HREADY low while the bridge
// is addressed, an error and a retry. Each mechanism is counted and must occur.
module tb_ahb2apb_top;
  import ahb2apb_pkg::*;

  localparam int WATCHDOG_CYCLES = 20000;
  localparam int N_RANDOM        = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------- DUT signals
  logic        hsel, hwrite, hready_i, retry_enable;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans, hresp;
  logic [2:0]  hsize, hburst;
  logic [3:0]  hprot;
  logic        hready_o;
  logic [31:0] paddr, pwdata, prdata;
  logic        pwrite, pread, psel, penable, pack, perr;
  logic [1:0]  psize;
  logic [2:0]  pburst;
  logic [3:0]  pbyte_en, pprot;
  logic        waits_on;
  int          fail_tokens, fails_used;

  ahb2apb_top dut (
    .ahb_clk(clk), .ahb_reset_n(rst_n),
    .ahb_slv_hsel_i(hsel), .ahb_slv_haddr_i(haddr), .ahb_slv_htrans_i(htrans),
    .ahb_slv_hwrite_i(hwrite), .ahb_slv_hsize_i(hsize), .ahb_slv_hburst_i(hburst),
    .ahb_slv_hprot_i(hprot), .ahb_slv_hwdata_i(hwdata), .ahb_slv_hready_i(hready_i),
    .retry_enable(retry_enable),
    .slv_ahb_hrdata_o(hrdata), .slv_ahb_hready_o(hready_o), .slv_ahb_hresp_o(hresp),
    .paddr(paddr), .pwrite(pwrite), .pread(pread), .pwdata(pwdata), .psize(psize),
    .pburst(pburst), .pbyte_en(pbyte_en), .pprot(pprot), .slv_ahb_sel(psel),
    .penable(penable), .slv_ahb_ack(pack), .slv_ahb_rdata(prdata),
    .xfer_error_access(perr)
  );

  apb_mem_model #(.MAX_WAIT(3)) u_mem (
    .clk(clk), .rst_n(rst_n), .sel(psel), .enable(penable), .write(pwrite),
    .addr(paddr), .wdata(pwdata), .byte_en(pbyte_en), .waits_on(waits_on),
    .fail_tokens(fail_tokens), .ack(pack), .rdata(prdata), .err(perr),
    .fails_used(fails_used)
  );

  // Bus HREADY: the ready of whichever slave owns the data phase. Items
  // with sel=0 go to a second slave that stretches its data phases by a
  // random number of cycles, so the bridge sees HREADY low while it is idle.
  logic dp_o;               // the other slave owns the data phase
  logic other_ready;
  logic bus_hready;
  assign bus_hready = dp_o ? other_ready : hready_o;
  assign hready_i   = bus_hready;

  // ---------------- bookkeeping
  int checks = 0, failures = 0, cyc = 0;
  int n_read, n_write, n_rburst, n_wburst, n_b2b, n_wait, n_busy, n_error,
      n_retry, n_byte, n_half, n_other, n_held_off;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  typedef struct {
    logic [31:0] addr;
    logic        write;
    logic [2:0]  size;
    logic [2:0]  burst;
    logic [1:0]  trans;
    logic [3:0]  prot;
    logic [31:0] wdata;
    logic        sel;
  } item_t;

  item_t seq[$];
  int    ap_i, dp_i;
  bit    dp_v, cancel;
  int    acc_cyc[int];
  int    waits_of[int];
  int    exp_apb[$];          // indices of accepted transfers awaiting APB
  logic [3:0] be_log[$];      // byte enables seen on APB, for phase 1

  // reference memory, same start contents as the peripheral
  logic [31:0] refmem [256];
  function automatic logic [31:0] ref_init(input int i);
    return 32'h5A00_0000 ^ (i * 32'h0001_0203);
  endfunction

  // byte-lane table of the testbench (explicit, not shifted)
  function automatic logic [3:0] exp_be(input logic [1:0] a, input logic [2:0] s);
    case (s)
      3'd0: case (a) 2'd0: return 4'h1; 2'd1: return 4'h2; 2'd2: return 4'h4; default: return 4'h8; endcase
      3'd1: return a[1] ? 4'hC : 4'h3;
      default: return 4'hF;
    endcase
  endfunction

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] be);
    logic [31:0] r = old;
    for (int b = 0; b < 4; b++) if (be[b]) r[8*b +: 8] = d[8*b +: 8];
    return r;
  endfunction

  // ---------------- AHB master: address phase drive
  item_t cur;
  always_comb begin
    cur = '{addr: 32'h0, write: 1'b0, size: 3'd0, burst: 3'd0, trans: HTRANS_IDLE,
            prot: 4'h0, wdata: 32'h0, sel: 1'b0};
    if (ap_i < seq.size()) cur = seq[ap_i];
    hsel   = cur.sel;
    haddr  = cur.addr;
    hwrite = cur.write;
    hsize  = cur.size;
    hburst = cur.burst;
    hprot  = cur.prot;
    htrans = cancel ? HTRANS_IDLE : cur.trans;
    hwdata = (dp_v && dp_i < seq.size()) ? seq[dp_i].wdata : 32'h0;
  end

  wire valid_ap = hsel && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
  wire other_ap = !hsel && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);

  // completion of a data phase
  task automatic complete(input int i);
    item_t it = seq[i];
    int    lat = cyc - acc_cyc[i];
    int    exp_lat = (it.write ? 4 : 3) + waits_of[i] + (hresp != HRESP_OKAY ? 1 : 0);
    check(lat == exp_lat, $sformatf("latency of transfer %0d is %0d, expected %0d", i, lat, exp_lat));
    if (hresp == HRESP_OKAY) begin
      if (it.write) begin
        refmem[it.addr[9:2]] = merge(refmem[it.addr[9:2]], it.wdata, exp_be(it.addr[1:0], it.size));
      end else begin
        check(hrdata == refmem[it.addr[9:2]],
              $sformatf("read %h: got %h expected %h", it.addr, hrdata, refmem[it.addr[9:2]]));
      end
      check(it.addr[31:24] != 8'hEE || fails_used >= fail_tokens, "expected an error response");
    end else begin
      check(it.addr[31:24] == 8'hEE, $sformatf("unexpected error response at %h", it.addr));
      check(hresp == (retry_enable ? HRESP_RETRY : HRESP_ERROR), "wrong error response kind");
      if (hresp == HRESP_RETRY) n_retry++; else n_error++;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (!hready_o && hresp != HRESP_OKAY) cancel <= 1'b1;        // first error cycle
      if (dp_o && !bus_hready && valid_ap) n_held_off++;  // bridge addressed, bus held
      if (dp_o) other_ready <= ($urandom_range(2, 0) == 0);
      if (bus_hready) begin
        if (htrans == HTRANS_BUSY) n_busy++;
        if (dp_v) complete(dp_i);
        if (dp_v && hresp != HRESP_OKAY) begin                   // second error cycle
          cancel <= 1'b0;
          dp_v   <= 1'b0;
          if (hresp == HRESP_RETRY) ap_i <= dp_i;                // re-issue
        end else begin
          if (valid_ap) begin
            acc_cyc[ap_i] = cyc;
            exp_apb.push_back(ap_i);
            if (dp_v) n_b2b++;
            if (seq[ap_i].size == 3'd0) n_byte++;
            if (seq[ap_i].size == 3'd1) n_half++;
            if (seq[ap_i].write) n_write++; else n_read++;
            if (seq[ap_i].trans == HTRANS_SEQ) begin
              if (seq[ap_i].write) n_wburst++; else n_rburst++;
            end
          end
          dp_v <= valid_ap;
          dp_i <= ap_i;
          dp_o <= other_ap;
          if (other_ap) begin
            n_other++;
            other_ready <= ($urandom_range(2, 0) == 0);
          end
          if (ap_i < seq.size()) ap_i <= ap_i + 1;
        end
      end
    end
  end

  // ---------------- APB monitor
  int  wait_cnt = 0;
  logic psel_q = 1'b0, penable_q = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      psel_q <= psel; penable_q <= penable;
      if (penable) check(psel && psel_q, "PENABLE without a preceding setup phase");
      if (psel && !penable) check(!psel_q || penable_q, "setup phase longer than one cycle");
      if (psel && penable && !pack) begin wait_cnt++; n_wait++; end
      if (psel && penable && pack) begin
        if (exp_apb.size() == 0) check(1'b0, "APB transfer with no AHB transfer");
        else begin
          automatic int    i  = exp_apb.pop_front();
          automatic item_t it = seq[i];
          check(paddr == it.addr,  $sformatf("paddr %h expected %h", paddr, it.addr));
          check(pwrite == it.write && pread == !it.write, "pwrite/pread");
          check(psize == it.size[1:0], "psize");
          check(pburst == it.burst, "pburst");
          check(pprot == it.prot, "pprot");
          check(pbyte_en == exp_be(it.addr[1:0], it.size),
                $sformatf("pbyte_en %h for %h size %0d", pbyte_en, it.addr, it.size));
          if (it.write) check(pwdata == it.wdata, $sformatf("pwdata %h expected %h", pwdata, it.wdata));
          waits_of[i] = wait_cnt;
          be_log.push_back(pbyte_en);
        end
        wait_cnt = 0;
      end
    end
  end

  // ---------------- sequence helpers
  function automatic item_t mk(input logic [31:0] a, input logic w, input logic [2:0] s,
                               input logic [2:0] b, input logic [1:0] t, input logic [31:0] d);
    item_t it = '{addr: a, write: w, size: s, burst: b, trans: t, prot: 4'h3,
                  wdata: d, sel: 1'b1};
    return it;
  endfunction

  task automatic run_phase(input string name);
    int start = cyc;
    ap_i = 0; dp_v = 1'b0; cancel = 1'b0;
    @(posedge clk);
    while (ap_i < seq.size() || dp_v || dp_o) @(posedge clk);
    repeat (3) @(posedge clk);
    check(exp_apb.size() == 0, {name, ": APB transfers missing"});
    $display("phase %-12s %0d transfers in %0d cycles", name, seq.size(), cyc - start);
    acc_cyc.delete(); waits_of.delete();
  endtask

  initial begin
    n_read = 0; n_write = 0; n_rburst = 0; n_wburst = 0; n_b2b = 0; n_wait = 0;
    n_busy = 0; n_error = 0; n_retry = 0; n_byte = 0; n_half = 0; n_other = 0;
    n_held_off = 0; dp_o = 1'b0; other_ready = 1'b1;
    for (int i = 0; i < 256; i++) refmem[i] = ref_init(i);
    ap_i = 0; dp_i = 0; dp_v = 1'b0; cancel = 1'b0;
    retry_enable = 1'b0; waits_on = 1'b0; fail_tokens = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1: byte INCR read burst of the waveform figure, then an IDLE at 0x105
    seq = {};
    seq.push_back(mk(32'h101, 0, 3'd0, 3'd1, HTRANS_NONSEQ, 0));
    seq.push_back(mk(32'h102, 0, 3'd0, 3'd1, HTRANS_SEQ, 0));
    seq.push_back(mk(32'h103, 0, 3'd0, 3'd1, HTRANS_SEQ, 0));
    seq.push_back(mk(32'h104, 0, 3'd0, 3'd1, HTRANS_SEQ, 0));
    seq.push_back(mk(32'h105, 0, 3'd0, 3'd1, HTRANS_IDLE, 0));
    be_log = {};
    run_phase("fig_burst");
    check(be_log.size() == 4 && be_log[0] == 4'h2 && be_log[1] == 4'h4 &&
          be_log[2] == 4'h8 && be_log[3] == 4'h1, "byte enables 2,4,8,1 of the burst");

    // 2: single write and read back
    seq = {};
    seq.push_back(mk(32'h200, 1, 3'd2, 3'd0, HTRANS_NONSEQ, 32'hCAFE_F00D));
    seq.push_back(mk(32'h0, 0, 3'd0, 3'd0, HTRANS_IDLE, 0));
    seq.push_back(mk(32'h200, 0, 3'd2, 3'd0, HTRANS_NONSEQ, 0));
    run_phase("single");

    // 3: INCR4 write burst with a BUSY beat, INCR4 read burst
    seq = {};
    for (int k = 0; k < 4; k++) begin
      seq.push_back(mk(32'h300 + 4*k, 1, 3'd2, 3'd3, k == 0 ? HTRANS_NONSEQ : HTRANS_SEQ,
                       32'h1111_0000 + k));
      if (k == 1) seq.push_back(mk(32'h300 + 4*(k+1), 1, 3'd2, 3'd3, HTRANS_BUSY, 0));
    end
    for (int k = 0; k < 4; k++)
      seq.push_back(mk(32'h300 + 4*k, 0, 3'd2, 3'd3, k == 0 ? HTRANS_NONSEQ : HTRANS_SEQ, 0));
    run_phase("bursts");

    // 4: back-to-back writes and reads of mixed sizes
    seq = {};
    seq.push_back(mk(32'h402, 1, 3'd1, 3'd0, HTRANS_NONSEQ, 32'hBEEF_0000));
    seq.push_back(mk(32'h400, 0, 3'd2, 3'd0, HTRANS_NONSEQ, 0));
    seq.push_back(mk(32'h401, 1, 3'd0, 3'd0, HTRANS_NONSEQ, 32'h0000_7700));
    seq.push_back(mk(32'h400, 0, 3'd2, 3'd0, HTRANS_NONSEQ, 0));
    seq.push_back(mk(32'h400, 1, 3'd1, 3'd0, HTRANS_NONSEQ, 32'h0000_1234));
    seq.push_back(mk(32'h402, 0, 3'd1, 3'd0, HTRANS_NONSEQ, 0));
    run_phase("back2back");

    // 5: random mix with peripheral wait states
    waits_on = 1'b1;
    seq = {};
    for (int k = 0; k < N_RANDOM; k++) begin
      automatic logic [2:0] s = 3'($urandom_range(2, 0));
      automatic logic [31:0] a = {22'h0, 8'($urandom), 2'b00};
      a[1:0] = (s == 3'd0) ? 2'($urandom) : (s == 3'd1) ? {1'($urandom), 1'b0} : 2'b00;
      case ($urandom_range(9, 0))
        0:       seq.push_back(mk(a, 0, s, 3'd0, HTRANS_IDLE, 0));
        1:       seq.push_back(mk(a, 0, s, 3'd1, HTRANS_BUSY, 0));
        default: seq.push_back(mk(a, 1'($urandom), s, 3'd1, HTRANS_NONSEQ, $urandom));
      endcase
      seq[$].prot = 4'($urandom);
    end
    run_phase("random");
    waits_on = 1'b0;

    // 6: shared bus: transfers to another, slower slave interleaved with
    //    bridge transfers; the bridge must wait for the bus HREADY
    seq = {};
    for (int k = 0; k < 60; k++) begin
      automatic logic [31:0] a = {22'h0, 8'($urandom), 2'b00};
      seq.push_back(mk(a, 1'($urandom), 3'd2, 3'd0, HTRANS_NONSEQ, $urandom));
      if (k % 2 == 0) seq[$].sel = 1'b0;
    end
    run_phase("shared_bus");

    // 7: peripheral error, ERROR response; the write must not land
    fail_tokens = fails_used + 1;
    seq = {};
    seq.push_back(mk(32'hEE00_0040, 1, 3'd2, 3'd0, HTRANS_NONSEQ, 32'hDEAD_DEAD));
    seq.push_back(mk(32'h0000_0044, 0, 3'd2, 3'd0, HTRANS_NONSEQ, 0));
    seq.push_back(mk(32'h0000_0040, 0, 3'd2, 3'd0, HTRANS_NONSEQ, 0));
    run_phase("error");

    // 8: peripheral error with retry_enable: RETRY, the master re-issues
    retry_enable = 1'b1;
    fail_tokens = fails_used + 1;
    seq = {};
    seq.push_back(mk(32'hEE00_0080, 0, 3'd2, 3'd0, HTRANS_NONSEQ, 0));
    seq.push_back(mk(32'h0000_0084, 0, 3'd2, 3'd0, HTRANS_NONSEQ, 0));
    run_phase("retry");
    retry_enable = 1'b0;

    check(n_read   > 0, "no read");
    check(n_write  > 0, "no write");
    check(n_rburst > 0, "no read burst");
    check(n_wburst > 0, "no write burst");
    check(n_b2b    > 0, "no back-to-back transfer");
    check(n_wait   > 0, "no APB wait state");
    check(n_busy   > 0, "no BUSY cycle");
    check(n_error  > 0, "no ERROR response");
    check(n_retry  > 0, "no RETRY response");
    check(n_byte   > 0 && n_half > 0, "no byte or halfword transfer");
    check(n_other  > 0, "no transfer to the other slave");
    check(n_held_off > 0, "bridge never addressed while the bus HREADY was low");
    $display("reads=%0d writes=%0d read_burst_beats=%0d write_burst_beats=%0d back_to_back=%0d",
             n_read, n_write, n_rburst, n_wburst, n_b2b);
    $display("wait_cycles=%0d busy=%0d errors=%0d retries=%0d byte=%0d half=%0d",
             n_wait, n_busy, n_error, n_retry, n_byte, n_half);
    $display("other_slave=%0d bridge_held_off_by_bus_hready=%0d", n_other, n_held_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
