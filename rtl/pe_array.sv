// pe_array: the associative processing array. N PE cells, each a PE with its
// own local data memory, plus the two circuits that combine all PEs: the
// responder resolution circuit and the MAX/MIN (Falkoff) circuit.
// Connections (following the PE/MAX-MIN/responder-resolution diagrams):
//   - every PE's responder bit R[i] goes to the resolution circuit, which
//     returns Responder_Before_Me V[i] to that PE's Find/Step/ResolveFirst
//     unit and gives At_Least_One_Responder (any_resp) to the ISCU;
//   - every PE's GPR (the one named by rs1) and responder bit go to the
//     MAX/MIN circuit as D[i] and RPD[i]; its MM[i] goes back to PE i.
// LDRRSPD: spd_data is the rs1 GPR of the first responder (the PE whose
// responder bit is set and whose V[i] is '0'); the ISCU copies it into a
// common register. This read path is this design's choice.
// Host port: while `host_en` is set (processor idle) the PE memories are
// reachable from outside; host_pe picks the PE. host_rdata is the selected
// memory's output one clock after the address. This loading path is this
// design's own; the published prototype gives none.
module pe_array
  import asc_pkg::*;
#(
  parameter int unsigned N_PE      = 4,
  parameter int unsigned MEM_DEPTH = 256,
  localparam int unsigned MA       = $clog2(MEM_DEPTH),
  localparam int unsigned PA       = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_cmd_t           cmd,
  output logic              any_resp,
  output logic [DW-1:0]     spd_data,
  output logic [N_PE-1:0]   resp,
  output logic [N_PE-1:0]   mask_top,
  output logic [N_PE-1:0]   mm,
  // host access to the PE memories
  input  logic              host_en,
  input  logic [PA-1:0]     host_pe,
  input  logic              host_we,
  input  logic [MA-1:0]     host_addr,
  input  logic [DW-1:0]     host_wdata,
  output logic [DW-1:0]     host_rdata
);
  logic [N_PE-1:0]          before_me;
  logic [N_PE-1:0][DW-1:0]  gpr_rs1, rdata;

  resp_resolver #(.N(N_PE)) u_rr (.r(resp), .before_me, .any_resp);

  maxmin_unit #(.N(N_PE), .W(DW)) u_mm (
    .clk, .rst_n,
    .load  (cmd.valid && cmd.ins.op == OP_LDMXMI),
    .data  (gpr_rs1),
    .set_mm(cmd.valid && cmd.ins.op == OP_SETMXMI),
    .rpd   (resp),
    .step  (cmd.valid && cmd.ins.op inside {OP_MAX, OP_MIN}),
    .op_min(cmd.ins.op == OP_MIN),
    .mm
  );

  for (genvar i = 0; i < N_PE; i++) begin : g_cell
    logic          pe_we, m_we;
    logic [MA-1:0] pe_addr, m_addr;
    logic [DW-1:0] pe_wd, m_wd;

    pe #(.MEM_AW(MA)) u_pe (
      .clk, .rst_n, .cmd, .before_me(before_me[i]), .mm(mm[i]),
      .resp(resp[i]), .mask_top(mask_top[i]), .gpr_rs1(gpr_rs1[i]),
      .mem_we(pe_we), .mem_addr(pe_addr), .mem_wdata(pe_wd),
      .mem_rdata(rdata[i])
    );

    always_comb begin
      if (host_en) begin
        m_we   = host_we && (host_pe == PA'(i));
        m_addr = host_addr;
        m_wd   = host_wdata;
      end else begin
        m_we   = pe_we;
        m_addr = pe_addr;
        m_wd   = pe_wd;
      end
    end

    sp_ram #(.W(DW), .DEPTH(MEM_DEPTH)) u_mem (
      .clk, .we(m_we), .addr(m_addr), .wdata(m_wd), .rdata(rdata[i])
    );
  end

  // first responder's GPR and host read data
  always_comb begin
    spd_data = '0;
    for (int i = 0; i < N_PE; i++)
      if (resp[i] && !before_me[i]) spd_data = gpr_rs1[i];
  end

  logic [PA-1:0] host_pe_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_pe_q <= '0;
    else        host_pe_q <= host_pe;
  end
  assign host_rdata = rdata[host_pe_q];
endmodule
