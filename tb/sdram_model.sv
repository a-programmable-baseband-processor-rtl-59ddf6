// sdram_model: behavioural model of the external SDRAM channels, for
// simulation only (not synthesizable intent; the real parts are off-chip
// memories). Each channel answers the request/acknowledge port of the
// streaming memory system: a request is held until ack, which comes after a
// random wait of 0..MAX_WAIT extra cycles (at least two cycles after the
// request appears); read data is valid with ack. Word w of the flat address
// space is word w / CHANNELS of channel w % CHANNELS. peek/poke give the
// testbench direct access by flat address.
module sdram_model
  import sbp_pkg::*;
#(
  parameter int unsigned CHANNELS = MEM_CHANNELS,
  parameter int unsigned DEPTH    = 4096,  // words per channel
  parameter int unsigned MAX_WAIT = 3
)(
  input  logic                         clk,
  input  logic      [CHANNELS-1:0]     req,
  input  logic      [CHANNELS-1:0]     we,
  input  mem_addr_t [CHANNELS-1:0]     addr,
  input  word_t     [CHANNELS-1:0]     wdata,
  output logic      [CHANNELS-1:0]     ack,
  output word_t     [CHANNELS-1:0]     rdata,
  output int unsigned                  accesses
);
  word_t mem [CHANNELS][DEPTH];
  int unsigned wait_cnt [CHANNELS];
  bit          active   [CHANNELS];
  int unsigned max_wait = MAX_WAIT;  // may be changed by the testbench

  initial begin
    ack = '0;
    rdata = '0;
    accesses = 0;
    for (int c = 0; c < int'(CHANNELS); c++) begin
      active[c] = 0;
      wait_cnt[c] = 0;
      for (int a = 0; a < int'(DEPTH); a++) mem[c][a] = '0;
    end
  end

  always @(posedge clk) begin
    for (int c = 0; c < int'(CHANNELS); c++) begin
      ack[c] <= 1'b0;
      if (active[c]) begin
        if (wait_cnt[c] == 0) begin
          active[c] = 0;
          ack[c] <= 1'b1;
          accesses++;
          if (we[c]) mem[c][addr[c] % DEPTH] = wdata[c];
          else rdata[c] <= mem[c][addr[c] % DEPTH];
        end else wait_cnt[c]--;
      end else if (req[c] && !ack[c]) begin
        active[c] = 1;
        wait_cnt[c] = $urandom_range(max_wait, 0);
      end
    end
  end

  function automatic word_t peek(int unsigned w);
    return mem[w % CHANNELS][(w / CHANNELS) % DEPTH];
  endfunction

  function automatic void poke(int unsigned w, word_t v);
    mem[w % CHANNELS][(w / CHANNELS) % DEPTH] = v;
  endfunction
endmodule
