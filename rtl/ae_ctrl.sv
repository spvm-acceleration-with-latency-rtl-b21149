// ae_ctrl: control registers of one application engine.
//
// The host describes an SpMV job through these registers: the number of
// rows (threads) and the base addresses of the row_ptr, col, val, vec and
// out arrays. Writing 1 to bit 0 of CTRL starts the job (a one-cycle start
// pulse to the kernel); STATUS reads back {busy, done}. Which values the
// registers hold follows the kernel description; the register map, the
// 64-bit register port and the start/status bits are this design's own.
//
//   addr 0 LENGTH   addr 1 ROW_BASE  addr 2 COL_BASE  addr 3 VAL_BASE
//   addr 4 VEC_BASE addr 5 OUT_BASE  addr 6 CTRL (write) / STATUS (read)
//
// Writes take effect at the clock edge; reads are combinational. Writing
// the job registers while busy changes the addresses the PEs use and is
// not allowed (checked by an assertion).
module ae_ctrl
  import mtfpga_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  word_t       reg_wdata,
  output word_t       reg_rdata,
  input  logic        done,
  output job_t        job,
  output logic        start,
  output logic        busy
);

  job_t job_q;
  logic start_q, busy_q;

  assign job   = job_q;
  assign start = start_q;
  assign busy  = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      job_q   <= '0;
      start_q <= 1'b0;
      busy_q  <= 1'b0;
    end else begin
      start_q <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          3'd0: job_q.length   <= reg_wdata[IDX_W-1:0];
          3'd1: job_q.row_base <= reg_wdata[ADDR_W-1:0];
          3'd2: job_q.col_base <= reg_wdata[ADDR_W-1:0];
          3'd3: job_q.val_base <= reg_wdata[ADDR_W-1:0];
          3'd4: job_q.vec_base <= reg_wdata[ADDR_W-1:0];
          3'd5: job_q.out_base <= reg_wdata[ADDR_W-1:0];
          3'd6: if (reg_wdata[0] && !busy_q) begin
            start_q <= 1'b1;
            busy_q  <= 1'b1;
          end
          default: ;
        endcase
      end
      // done is still high from the last job during the start pulse
      if (busy_q && !start_q && done) busy_q <= 1'b0;
    end
  end

  always_comb begin
    unique case (reg_addr)
      3'd0:    reg_rdata = word_t'(job_q.length);
      3'd1:    reg_rdata = word_t'(job_q.row_base);
      3'd2:    reg_rdata = word_t'(job_q.col_base);
      3'd3:    reg_rdata = word_t'(job_q.val_base);
      3'd4:    reg_rdata = word_t'(job_q.vec_base);
      3'd5:    reg_rdata = word_t'(job_q.out_base);
      3'd6:    reg_rdata = {62'd0, busy_q, done && !busy_q};
      default: reg_rdata = '0;
    endcase
  end

  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    (reg_we && busy_q) |-> (reg_addr == 3'd6));

endmodule
