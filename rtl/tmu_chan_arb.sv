// tmu_chan_arb: control unit that shares the TMU's single memory channel.
//
// NW write sources (the output streams, one per PE) and one read source
// (the row-pointer stream) compete for one channel. A pending write always
// wins over the read, which keeps results draining so that PEs get their
// output-buffer space back and the kernel cannot deadlock; that priority
// follows the kernel description. Among the writes a round-robin pointer
// picks the next source after the one last served (this design's choice).
// The arbiter is combinational: the chosen request is shown on the channel
// and the *_grant of its source is high in the cycle the channel accepts it.
module tmu_chan_arb
  import mtfpga_pkg::*;
#(
  parameter int unsigned NW = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NW-1:0]     wr_valid,
  input  mem_req_t [NW-1:0] wr_req,
  output logic [NW-1:0]     wr_grant,
  input  logic              rd_valid,
  input  mem_req_t          rd_req,
  output logic              rd_grant,
  output logic              ch_req_valid,
  output mem_req_t          ch_req,
  input  logic              ch_req_ready
);

  localparam int unsigned PW = (NW > 1) ? $clog2(NW) : 1;

  logic [PW-1:0] rr_q;     // source served last
  logic [PW-1:0] pick;
  logic          any_wr;

  always_comb begin
    any_wr = 1'b0;
    pick   = '0;
    for (int k = 1; k <= NW; k++) begin
      int unsigned i;
      i = (int'(rr_q) + k) % NW;
      if (!any_wr && wr_valid[i]) begin
        any_wr = 1'b1;
        pick   = PW'(i);
      end
    end
  end

  always_comb begin
    wr_grant     = '0;
    rd_grant     = 1'b0;
    ch_req_valid = any_wr || rd_valid;
    ch_req       = any_wr ? wr_req[pick] : rd_req;
    if (any_wr) wr_grant[pick] = ch_req_ready;
    else        rd_grant       = rd_valid && ch_req_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       rr_q <= PW'(NW - 1);
    else if (any_wr && ch_req_ready)  rr_q <= pick;
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({wr_grant, rd_grant}));

endmodule
