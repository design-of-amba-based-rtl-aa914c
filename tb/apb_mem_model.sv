// Behavioural APB peripheral for the bridge testbenches: a 256-word memory.
//
// Not synthesizable design code; it stands in for the UART, timer or other
// peripheral behind the bridge. Word index is paddr[9:2]. Word i starts as
// init_word(i) (see below). A write stores the byte lanes given by
// pbyte_en; a read returns the whole word. In the access phase (sel and
// enable high) it holds slv_ahb_ack low for a random 0..MAX_WAIT cycles when
// `waits_on` is set, else acknowledges at once. xfer_error_access is raised
// with the acknowledge when the address is in the 0xEE00_0000 region and
// `fail_tokens` is above zero; each such failure uses one token and leaves
// the memory unchanged.
module apb_mem_model #(
  parameter int unsigned MAX_WAIT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        enable,
  input  logic        write,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  byte_en,
  input  logic        waits_on,
  input  int          fail_tokens,
  output logic        ack,
  output logic [31:0] rdata,
  output logic        err,
  output int          fails_used
);

  function automatic logic [31:0] init_word(input int i);
    return 32'h5A00_0000 ^ (i * 32'h0001_0203);
  endfunction

  logic [31:0] mem [256];
  int          wait_left;

  wire [7:0] idx = addr[9:2];

  assign ack   = sel && enable && (wait_left == 0);
  assign rdata = mem[idx];
  assign err   = ack && (addr[31:24] == 8'hEE) && (fails_used < fail_tokens);

  initial for (int i = 0; i < 256; i++) mem[i] = init_word(i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_left   <= 0;
      fails_used  <= 0;
    end else begin
      // pick the wait count at the start of each access phase
      if (sel && !enable)
        wait_left <= waits_on ? int'($urandom_range(MAX_WAIT, 0)) : 0;
      else if (sel && enable && wait_left > 0)
        wait_left <= wait_left - 1;
      if (ack) begin
        if (err) fails_used <= fails_used + 1;
        else if (write)
          for (int b = 0; b < 4; b++)
            if (byte_en[b]) mem[idx][8*b +: 8] <= wdata[8*b +: 8];
      end
    end
  end

endmodule
