// mtfpga_ae: the multithreaded SpMV kernel on one application engine.
//
// One thread management unit (tmu) feeds NPE processing elements
// (spmv_pe); the control registers (ae_ctrl) hold the job. Each PE needs
// three memory channels (column, value and vector reads) and the TMU one
// (row-pointer reads and output writes), so NPE = 5 uses all 16 channels of
// an engine, which is what bounds the PE count. The channel numbering is
// this design's choice:
//   channel 3p   : PE p column reads      channel 3p+1 : PE p value reads
//   channel 3p+2 : PE p vector reads      channel 3*NPE: TMU
// Every channel takes one request per cycle when ready and returns read
// data one word per cycle, in request order, without back-pressure.
// The structure follows the kernel description; buffer depths and
// arithmetic latencies are parameters with this design's defaults.
module mtfpga_ae
  import mtfpga_pkg::*;
#(
  parameter int unsigned NPE        = 5,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned THR_DEPTH  = 128,
  parameter int unsigned RES_DEPTH  = 16,
  parameter int unsigned MUL_LAT    = 6,
  parameter int unsigned ADD_LAT    = 8,
  localparam int unsigned NCH       = 3 * NPE + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // control registers
  input  logic                reg_we,
  input  logic [2:0]          reg_addr,
  input  word_t               reg_wdata,
  output word_t               reg_rdata,
  output logic                busy,
  // memory channels
  output logic [NCH-1:0]      mem_req_valid,
  output mem_req_t [NCH-1:0]  mem_req,
  input  logic [NCH-1:0]      mem_req_ready,
  input  logic [NCH-1:0]      mem_rsp_valid,
  input  word_t [NCH-1:0]     mem_rsp_data
);

  job_t job;
  logic start, done;

  ae_ctrl u_ctrl (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .done, .job, .start, .busy);

  logic [NPE-1:0]    pe_thr_valid, pe_busy, pe_res_valid, pe_res_free;
  thread_t           pe_thr;
  result_t [NPE-1:0] pe_res;

  tmu #(.NPE(NPE), .THR_DEPTH(THR_DEPTH), .RES_DEPTH(RES_DEPTH)) u_tmu (
    .clk, .rst_n,
    .start, .length(job.length), .row_base(job.row_base), .out_base(job.out_base),
    .done,
    .ch_req_valid(mem_req_valid[3*NPE]), .ch_req(mem_req[3*NPE]),
    .ch_req_ready(mem_req_ready[3*NPE]),
    .ch_rsp_valid(mem_rsp_valid[3*NPE]), .ch_rsp_data(mem_rsp_data[3*NPE]),
    .pe_thr_valid, .pe_thr, .pe_busy, .pe_res_valid, .pe_res, .pe_res_free);

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    spmv_pe #(
      .FIFO_DEPTH(FIFO_DEPTH), .RES_DEPTH(RES_DEPTH),
      .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)
    ) u_pe (
      .clk, .rst_n,
      .col_base(job.col_base), .val_base(job.val_base), .vec_base(job.vec_base),
      .thr_valid(pe_thr_valid[p]), .thr(pe_thr), .busy(pe_busy[p]),
      .col_req_valid(mem_req_valid[3*p]),   .col_req(mem_req[3*p]),
      .col_req_ready(mem_req_ready[3*p]),
      .col_rsp_valid(mem_rsp_valid[3*p]),   .col_rsp_data(mem_rsp_data[3*p]),
      .val_req_valid(mem_req_valid[3*p+1]), .val_req(mem_req[3*p+1]),
      .val_req_ready(mem_req_ready[3*p+1]),
      .val_rsp_valid(mem_rsp_valid[3*p+1]), .val_rsp_data(mem_rsp_data[3*p+1]),
      .vec_req_valid(mem_req_valid[3*p+2]), .vec_req(mem_req[3*p+2]),
      .vec_req_ready(mem_req_ready[3*p+2]),
      .vec_rsp_valid(mem_rsp_valid[3*p+2]), .vec_rsp_data(mem_rsp_data[3*p+2]),
      .res_valid(pe_res_valid[p]), .res(pe_res[p]), .res_free(pe_res_free[p]));
  end

endmodule
