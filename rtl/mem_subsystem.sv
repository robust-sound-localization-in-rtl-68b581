// mem_subsystem: the five 4 kB memory blocks of the chip and their port
// switching.
//
// Each microphone has two dedicated blocks, A and B. The one selected by
// fill_bank (0: A, 1: B) is the input buffer and takes the front end's
// writes; the other is the computational storage and is connected to the DSP
// core's port for that microphone. When the buffer fills, the front end
// toggles fill_bank and the blocks swap roles. The fifth block is shared by the
// two microphones and holds imaginary FFT terms; only the DSP core uses it.
// This organisation is the document's; the port muxing is this design's.
// All blocks are single-port with one-cycle read latency (sram_block).
module mem_subsystem
  import tdoa_pkg::*;
(
  input  logic                clk,
  input  logic                fill_bank,
  // front end (input buffers)
  input  logic                fe_we,
  input  logic [ADDR_W-1:0]   fe_addr,
  input  fp_t                 fe_wdata1,
  input  fp_t                 fe_wdata2,
  // DSP core: computational blocks and shared block
  input  mem_req_t            c1_req,
  input  logic                c1_en,
  output logic [WORD_W-1:0]   c1_rdata,
  input  mem_req_t            c2_req,
  input  logic                c2_en,
  output logic [WORD_W-1:0]   c2_rdata,
  input  mem_req_t            sh_req,
  input  logic                sh_en,
  output logic [WORD_W-1:0]   sh_rdata
);
  mem_req_t          req  [4];    // ch1 A, ch1 B, ch2 A, ch2 B
  logic              en   [4];
  logic [WORD_W-1:0] rd   [4];
  mem_req_t          fe1, fe2;

  always_comb begin
    fe1 = '{addr: fe_addr, we: fe_we, wdata: fe_wdata1};
    fe2 = '{addr: fe_addr, we: fe_we, wdata: fe_wdata2};
    req[0] = fill_bank ? c1_req : fe1;   en[0] = fill_bank ? c1_en : fe_we;
    req[1] = fill_bank ? fe1 : c1_req;   en[1] = fill_bank ? fe_we : c1_en;
    req[2] = fill_bank ? c2_req : fe2;   en[2] = fill_bank ? c2_en : fe_we;
    req[3] = fill_bank ? fe2 : c2_req;   en[3] = fill_bank ? fe_we : c2_en;
    c1_rdata = fill_bank ? rd[0] : rd[1];
    c2_rdata = fill_bank ? rd[2] : rd[3];
  end

  for (genvar b = 0; b < 4; b++) begin : g_blk
    sram_block #(.DEPTH(N_MAX), .WIDTH(WORD_W)) u_mem (
      .clk, .en(en[b]), .we(req[b].we), .addr(req[b].addr),
      .wdata(req[b].wdata), .rdata(rd[b])
    );
  end

  sram_block #(.DEPTH(N_MAX), .WIDTH(WORD_W)) u_shared (
    .clk, .en(sh_en), .we(sh_req.we), .addr(sh_req.addr),
    .wdata(sh_req.wdata), .rdata(sh_rdata)
  );
endmodule
