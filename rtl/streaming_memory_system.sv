// streaming_memory_system: moves streams between external SDRAM and the SRF.
//
// A transfer (xfer_t) walks a two-level address pattern: SRF element
// srf_addr + j, with j = o*inner_cnt + i, pairs with external word
// mem_addr + o*outer_stride + i*inner_stride. Unit strides give a plain block
// copy; other strides perform the data rearrangements a kernel sequence needs
// between kernels, such as gathering the odd and even columns of a matrix
// (inner stride 2) or a matrix transpose (inner stride = row length). While a
// transfer runs the clusters have nothing to do, which is why such
// rearrangements show up as memory stall time.
//
// External memory is MEM_CHANNELS word-interleaved SDRAM channels: word w is
// word w / MEM_CHANNELS of channel w % MEM_CHANNELS. Each channel port is a
// request/acknowledge pair: the request (mem_req with we, addr, wdata) is held
// until the channel pulses ack for one cycle; for a read, rdata is valid with
// ack. Every channel has its own access slot, so up to MEM_CHANNELS accesses
// are in flight at once: the address generator hands the next word to the
// slot of its channel as soon as that slot is free (or frees in the same
// cycle), at most one word per cycle. Load data goes to the single SRF write
// port in the acknowledge cycle; if two channels deliver together, the others
// keep their word in the slot and write it in later cycles, before any new
// arrival. Store data is fetched from the SRF into the slot the cycle before
// the slot requests. Unit-stride streams spread over all channels and
// overlap; a stride that is a multiple of MEM_CHANNELS keeps hitting one
// channel and runs one access at a time. With a memory that acknowledges two
// cycles after a request appears, one channel completes an access every three
// cycles (four for a store). mem_wait_cycles counts cycles in which some
// request waits for its acknowledge.
//
// Interface: start with xfer while idle; busy until the last word is written;
// done pulses in the cycle after that. The SRF port uses element accesses.
// Channel count follows the four SDRAMs of the design; the address pattern,
// the handshake and the slot scheme are this design's own.
module streaming_memory_system
  import sbp_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  xfer_t                                xfer,
  output logic                                 busy,
  output logic                                 done,
  // SRF port
  output srf_req_t                             srf_req,
  input  word_t                                srf_rdata,
  // SDRAM channels
  output logic      [MEM_CHANNELS-1:0]         mem_req,
  output logic      [MEM_CHANNELS-1:0]         mem_we,
  output mem_addr_t [MEM_CHANNELS-1:0]         mem_addr,
  output word_t     [MEM_CHANNELS-1:0]         mem_wdata,
  input  logic      [MEM_CHANNELS-1:0]         mem_ack,
  input  word_t     [MEM_CHANNELS-1:0]         mem_rdata,
  output logic      [31:0]                     mem_wait_cycles
);
  localparam int unsigned CW = $clog2(MEM_CHANNELS);

  // per-channel access slot
  typedef enum logic [1:0] {
    SL_FREE,   // no access
    SL_FETCH,  // store: word being read from the SRF
    SL_REQ,    // request on the channel, waiting for ack
    SL_DATA    // load: data waiting for the SRF write port
  } slot_e;

  slot_e     [MEM_CHANNELS-1:0] sl_state;
  mem_addr_t [MEM_CHANNELS-1:0] sl_addr;   // address inside the channel
  srf_addr_t [MEM_CHANNELS-1:0] sl_elem;   // SRF element of the word
  word_t     [MEM_CHANNELS-1:0] sl_data;

  // address generator
  logic      active;      // a transfer is running
  logic      gen_left;    // words remain to be handed out
  logic      store;
  xfer_t     x;
  cnt_t      i, o;
  mem_addr_t addr, addr_o;
  srf_addr_t j;

  // SRF write arbitration: a word already waiting in a slot goes first
  // (lowest channel); otherwise the lowest channel acknowledging a load this
  // cycle writes its data straight through.
  logic          wr_any, wr_direct;
  logic [CW-1:0] wr_ch;
  always_comb begin
    wr_any    = 1'b0;
    wr_direct = 1'b0;
    wr_ch     = '0;
    for (int c = MEM_CHANNELS - 1; c >= 0; c--)
      if (sl_state[c] == SL_REQ && mem_ack[c] && !store) begin
        wr_any    = 1'b1;
        wr_direct = 1'b1;
        wr_ch     = CW'(c);
      end
    for (int c = MEM_CHANNELS - 1; c >= 0; c--)
      if (sl_state[c] == SL_DATA) begin
        wr_any    = 1'b1;
        wr_direct = 1'b0;
        wr_ch     = CW'(c);
      end
  end

  // slots that are free, or become free at the end of this cycle
  logic [MEM_CHANNELS-1:0] free_now;
  always_comb begin
    for (int c = 0; c < MEM_CHANNELS; c++)
      free_now[c] = (sl_state[c] == SL_FREE) ||
                    (sl_state[c] == SL_REQ && mem_ack[c] && store) ||
                    (wr_any && wr_ch == CW'(c));
  end

  logic [CW-1:0] gch;     // channel of the next word
  logic          issue;   // next word handed to its slot this cycle
  assign gch   = addr[CW-1:0];
  assign issue = active && gen_left && free_now[gch];

  // store fetch in flight: the slot that receives srf_rdata this cycle
  logic          fetch_q;
  logic [CW-1:0] fetch_ch_q;

  logic all_free;
  always_comb begin
    all_free = 1'b1;
    for (int c = 0; c < MEM_CHANNELS; c++)
      if (sl_state[c] != SL_FREE) all_free = 1'b0;
  end

  assign busy = active;

  always_comb begin
    for (int c = 0; c < MEM_CHANNELS; c++) begin
      mem_req[c]   = (sl_state[c] == SL_REQ);
      mem_we[c]    = store;
      mem_addr[c]  = sl_addr[c];
      mem_wdata[c] = sl_data[c];
    end
    srf_req          = '0;
    srf_req.rd_en    = issue && store;
    srf_req.rd_addr  = x.srf_addr + j;
    srf_req.wr_en    = wr_any;
    srf_req.wr_addr  = sl_elem[wr_ch];
    srf_req.wdata    = {NUM_CLUSTERS{wr_direct ? mem_rdata[wr_ch] : sl_data[wr_ch]}}; // same word on every lane
  end

  // last word of the pattern
  logic last;
  assign last = (i == x.inner_cnt - 1'b1) && (o == x.outer_cnt - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active          <= 1'b0;
      gen_left        <= 1'b0;
      store           <= 1'b0;
      x               <= '0;
      i               <= '0;
      o               <= '0;
      j               <= '0;
      addr            <= '0;
      addr_o          <= '0;
      done            <= 1'b0;
      fetch_q         <= 1'b0;
      fetch_ch_q      <= '0;
      sl_state        <= '{default: SL_FREE};
      sl_addr         <= '0;
      sl_elem         <= '0;
      sl_data         <= '0;
      mem_wait_cycles <= '0;
    end else begin
      done <= 1'b0;
      if ((|mem_req) && ((mem_req & mem_ack) != mem_req)) mem_wait_cycles <= mem_wait_cycles + 1;

      // slots: acknowledge, store data arrival, SRF write
      for (int c = 0; c < MEM_CHANNELS; c++) begin
        if (sl_state[c] == SL_REQ && mem_ack[c]) begin
          if (store) sl_state[c] <= SL_FREE;
          else begin
            sl_state[c] <= SL_DATA;
            sl_data[c]  <= mem_rdata[c];
          end
        end
      end
      if (fetch_q) begin
        sl_state[fetch_ch_q] <= SL_REQ;
        sl_data[fetch_ch_q]  <= srf_rdata;
      end
      if (wr_any) sl_state[wr_ch] <= SL_FREE;
      fetch_q    <= issue && store;
      fetch_ch_q <= gch;

      // address generator
      if (!active) begin
        if (start) begin
          x      <= xfer;
          store  <= xfer.store;
          i      <= '0;
          o      <= '0;
          j      <= '0;
          addr   <= xfer.mem_addr;
          addr_o <= xfer.mem_addr;
          if (xfer.inner_cnt == 0 || xfer.outer_cnt == 0) done <= 1'b1;
          else begin
            active   <= 1'b1;
            gen_left <= 1'b1;
          end
        end
      end else begin
        if (issue) begin
          sl_state[gch] <= store ? SL_FETCH : SL_REQ;
          sl_addr[gch]  <= addr >> CW;
          sl_elem[gch]  <= x.srf_addr + j;
          j <= j + 1'b1;
          if (last) gen_left <= 1'b0;
          else if (i == x.inner_cnt - 1'b1) begin
            i      <= '0;
            o      <= o + 1'b1;
            addr   <= addr_o + MEM_AW'(x.outer_stride);
            addr_o <= addr_o + MEM_AW'(x.outer_stride);
          end else begin
            i    <= i + 1'b1;
            addr <= addr + MEM_AW'(x.inner_stride);
          end
        end
        if (!gen_left && all_free && !fetch_q) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  for (genvar c = 0; c < MEM_CHANNELS; c++) begin : g_chk
    a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
      mem_req[c] && !mem_ack[c] |=> mem_req[c] && $stable(mem_addr[c]) && $stable(mem_we[c]))
      else $error("channel %0d: request dropped before acknowledge", c);
  end
endmodule
