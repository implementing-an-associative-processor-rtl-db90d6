// asc_top: the byte-serial associative (ASC) processor. An instruction
// stream control unit (ISCU) with its 32-bit instruction memory, data memory
// and 16 common registers drives an array of N_PE processing elements (4 in
// the prototype) that execute each parallel instruction in lock step on
// their own local memories. Associative searches set responder bits; the
// responder resolution circuit and the MAX/MIN circuit combine them across
// the array, and the ISCU branches on whether any PE responds.
// Host interface (this design's own): while the processor is not running,
// imem_we loads the program, and dmem_* / pmem_* reach the ISCU data memory
// and the PE memories (read data one clock after the address). A pulse on
// `start` runs the program from address 0 until HALT, after which `halted`
// is high. The cell interconnection network of the ASC model is not part of
// this prototype.
module asc_top
  import asc_pkg::*;
#(
  parameter int unsigned N_PE      = 4,
  parameter int unsigned MEM_DEPTH = 256,
  localparam int unsigned PA       = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int unsigned MA       = $clog2(MEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              halted,
  output logic              any_resp,
  output logic [N_PE-1:0]   resp,
  output logic [N_PE-1:0]   mask_top,
  output logic [N_PE-1:0]   mm,
  output logic [AW-1:0]     pc,
  // program load
  input  logic              imem_we,
  input  logic [AW-1:0]     imem_waddr,
  input  logic [IW-1:0]     imem_wdata,
  // ISCU data memory host port
  input  logic              dmem_we,
  input  logic [AW-1:0]     dmem_addr,
  input  logic [DW-1:0]     dmem_wdata,
  output logic [DW-1:0]     dmem_rdata,
  // PE memory host port
  input  logic [PA-1:0]     pmem_pe,
  input  logic              pmem_we,
  input  logic [MA-1:0]     pmem_addr,
  input  logic [DW-1:0]     pmem_wdata,
  output logic [DW-1:0]     pmem_rdata
);
  logic [AW-1:0]  im_addr;
  logic [IW-1:0]  im_rdata;
  logic           c_dwe, d_we;
  logic [AW-1:0]  c_daddr, d_addr;
  logic [DW-1:0]  c_dwd, d_wd, d_rd, spd;
  pe_cmd_t        cmd;

  instr_mem #(.W(IW), .DEPTH(1 << AW)) u_imem (
    .clk, .raddr(im_addr), .rdata(im_rdata),
    .we(imem_we && !busy), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  iscu u_iscu (
    .clk, .rst_n, .start, .busy, .halted, .pc,
    .imem_addr(im_addr), .imem_rdata(im_rdata),
    .dmem_we(c_dwe), .dmem_addr(c_daddr), .dmem_wdata(c_dwd), .dmem_rdata(d_rd),
    .cmd, .any_resp, .spd_data(spd)
  );

  assign d_we   = busy ? c_dwe   : dmem_we;
  assign d_addr = busy ? c_daddr : dmem_addr;
  assign d_wd   = busy ? c_dwd   : dmem_wdata;

  sp_ram #(.W(DW), .DEPTH(1 << AW)) u_dmem (
    .clk, .we(d_we), .addr(d_addr), .wdata(d_wd), .rdata(d_rd)
  );
  assign dmem_rdata = d_rd;

  pe_array #(.N_PE(N_PE), .MEM_DEPTH(MEM_DEPTH)) u_array (
    .clk, .rst_n, .cmd, .any_resp, .spd_data(spd), .resp, .mask_top, .mm,
    .host_en(!busy), .host_pe(pmem_pe), .host_we(pmem_we),
    .host_addr(pmem_addr), .host_wdata(pmem_wdata), .host_rdata(pmem_rdata)
  );
endmodule
