// network_interface: streams SRF data to and from the external network.
//
// The network port connects the processor to its neighbours in the radio: the
// converter/RF side that delivers received samples and the host side that
// takes decoded bits. A send reads len consecutive SRF elements from
// srf_addr and presents each on net_out; a receive writes len words taken from
// net_in into consecutive SRF elements from srf_addr. Both ports are
// valid/ready handshakes: a word moves in a cycle where both are high.
//
// Timing: a send needs three cycles per word when the receiver is always
// ready (SRF read, capture, hand-over); a receive takes one word per cycle.
// done pulses the cycle after the last word. backpressure_cycles counts cycles
// in which a sent word waited for net_out_ready.
// The design names the network interface only; word width, handshake and
// command set are this design's own choices.
module network_interface
  import sbp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      send,       // 1: SRF -> network, 0: network -> SRF
  input  srf_addr_t srf_addr,
  input  logic [31:0] len,
  output logic      busy,
  output logic      done,
  // SRF port
  output srf_req_t  srf_req,
  input  word_t     srf_rdata,
  // network
  output logic      net_out_valid,
  input  logic      net_out_ready,
  output word_t     net_out_data,
  input  logic      net_in_valid,
  output logic      net_in_ready,
  input  word_t     net_in_data,
  output logic [31:0] backpressure_cycles
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_CAP, S_OUT, S_IN} state_e;
  state_e      state;
  srf_addr_t   base;
  logic [31:0] n, cnt;
  word_t       obuf;

  assign busy          = (state != S_IDLE);
  assign net_out_valid = (state == S_OUT);
  assign net_out_data  = obuf;
  assign net_in_ready  = (state == S_IN);

  always_comb begin
    srf_req          = '0;
    srf_req.rd_en    = (state == S_RD);
    srf_req.rd_addr  = base + srf_addr_t'(cnt);
    srf_req.wr_en    = (state == S_IN) && net_in_valid;
    srf_req.wr_addr  = base + srf_addr_t'(cnt);
    srf_req.wdata    = {NUM_CLUSTERS{net_in_data}}; // same word on every lane
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      base  <= '0;
      n     <= '0;
      cnt   <= '0;
      obuf  <= '0;
      done  <= 1'b0;
      backpressure_cycles <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          base <= srf_addr;
          n    <= len;
          cnt  <= '0;
          if (len == 0) done <= 1'b1;
          else state <= send ? S_RD : S_IN;
        end
        S_RD:  state <= S_CAP;
        S_CAP: begin
          obuf  <= srf_rdata;
          state <= S_OUT;
        end
        S_OUT: begin
          if (!net_out_ready) backpressure_cycles <= backpressure_cycles + 1;
          else begin
            cnt <= cnt + 1;
            if (cnt + 1 == n) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else state <= S_RD;
          end
        end
        S_IN: if (net_in_valid) begin
          cnt <= cnt + 1;
          if (cnt + 1 == n) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    net_out_valid && !net_out_ready |=> net_out_valid && $stable(net_out_data))
    else $error("network output changed before it was taken");
endmodule
