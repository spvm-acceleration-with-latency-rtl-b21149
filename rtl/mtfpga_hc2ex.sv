// mtfpga_hc2ex: the multithreaded SpMV accelerator replicated on all
// application engines (AEs) of the co-processor.
//
// Each AE is a separate FPGA with its own 16 memory channels and its own
// control registers, running the same kernel (mtfpga_ae) on its share of
// the matrix: the host gives each AE a row range by setting its length and
// base addresses (row_ptr, out and the row range's offset), as the kernel
// description allows. With NAE = 4 AEs and NPE = 5 PEs each, the
// accelerator has 20 PEs and uses 64 memory channels, the configuration
// evaluated as the main one. AEs share nothing but the clock and reset in
// this model. Port arrays are indexed [AE][channel]; the channel numbering
// inside an AE is that of mtfpga_ae.
module mtfpga_hc2ex
  import mtfpga_pkg::*;
#(
  parameter int unsigned NAE        = 4,
  parameter int unsigned NPE        = 5,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned THR_DEPTH  = 128,
  parameter int unsigned RES_DEPTH  = 16,
  parameter int unsigned MUL_LAT    = 6,
  parameter int unsigned ADD_LAT    = 8,
  localparam int unsigned NCH       = 3 * NPE + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NAE-1:0]                reg_we,
  input  logic [NAE-1:0][2:0]           reg_addr,
  input  word_t [NAE-1:0]               reg_wdata,
  output word_t [NAE-1:0]               reg_rdata,
  output logic [NAE-1:0]                busy,
  output logic [NAE-1:0][NCH-1:0]       mem_req_valid,
  output mem_req_t [NAE-1:0][NCH-1:0]   mem_req,
  input  logic [NAE-1:0][NCH-1:0]       mem_req_ready,
  input  logic [NAE-1:0][NCH-1:0]       mem_rsp_valid,
  input  word_t [NAE-1:0][NCH-1:0]      mem_rsp_data
);

  for (genvar a = 0; a < NAE; a++) begin : g_ae
    mtfpga_ae #(
      .NPE(NPE), .FIFO_DEPTH(FIFO_DEPTH), .THR_DEPTH(THR_DEPTH),
      .RES_DEPTH(RES_DEPTH), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)
    ) u_ae (
      .clk, .rst_n,
      .reg_we(reg_we[a]), .reg_addr(reg_addr[a]), .reg_wdata(reg_wdata[a]),
      .reg_rdata(reg_rdata[a]), .busy(busy[a]),
      .mem_req_valid(mem_req_valid[a]), .mem_req(mem_req[a]),
      .mem_req_ready(mem_req_ready[a]),
      .mem_rsp_valid(mem_rsp_valid[a]), .mem_rsp_data(mem_rsp_data[a]));
  end

endmodule
