// core_model: behavioural model of one processor core for the end-to-end test.
// Not synthesizable; it stands in for a 32-bit RISC core with a coprocessor
// interface and runs, in SystemVerilog instead of instructions, the debug
// exception service routine that monitoring-mode debugging relies on.
//
// System mode: one instruction per clock at `pc`, shown on the instruction
// bus (I_REQ, I_ADDR, I_DATA = pc XOR A500_0000).  Instructions whose pc[3:2]
// is 3 store gpr[1] to data address 0x1000 + 4*pc[9:4] over the data bus;
// the others increment gpr[pc[3:2]+1].  pc wraps at 0x100.  Reset pc is
// START_PC.
//
// When ext_bkpt_en is high at the start of a cycle the core enters the debug
// exception instead of fetching: Exception_ack goes high, the return address
// (the next pc) is written to the CFD's RDATA and C.ACK is set.  The routine
// then polls the MMCR over the coprocessor interface and serves each command
// (D.ACK set): register, memory or processor-status read/write, then answers
// with C.ACK.  SS&END leaves the exception and resumes at the return address.
// Memory accesses of the routine use the data bus while Exception_ack is high.
//
// From the source design: the two modes (system and monitoring), entry through
// ext_bkpt_en, the Exception_ack signal, and the routine's set of services
// driven by the MMCR.  The loop program, the memory size, the one-instruction-
// per-clock timing and the coprocessor-interface timing are this model's own.
module core_model
  import ea_mocd_pkg::*;
#(
  parameter logic [XLEN-1:0] START_PC  = '0,
  parameter int unsigned     MEM_WORDS = 256
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ext_bkpt_en,
  output logic                  i_req,
  output logic [XLEN-1:0]       i_addr,
  output logic [XLEN-1:0]       i_data,
  output logic                  d_req,
  output logic                  d_nrw,
  output logic [XLEN-1:0]       d_addr,
  output logic [XLEN-1:0]       d_rdata,
  output logic [XLEN-1:0]       d_wdata,
  output logic                  exception_ack,
  output logic                  cop_req,
  output logic                  cop_type,
  output logic [COP_NUMB_W-1:0] cop_numb,
  output logic [XLEN-1:0]       cop_wdata,
  input  logic [XLEN-1:0]       cop_rdata
);

  logic [XLEN-1:0] gpr  [16];
  logic [XLEN-1:0] dmem [MEM_WORDS];
  logic [XLEN-1:0] psr, pc, epc;

  int unsigned retired   = 0;   // instructions executed in system mode
  int unsigned entries   = 0;   // debug exception entries
  int unsigned n_reg_r   = 0, n_reg_w = 0, n_mem_r = 0, n_mem_w = 0;
  int unsigned n_ps_r    = 0, n_ps_w  = 0, n_exit  = 0;

  function automatic int unsigned widx(input logic [XLEN-1:0] a);
    return (a >> 2) % MEM_WORDS;
  endfunction

  task automatic new_cycle();
    @(posedge clk);
    #1;
    i_req = 1'b0; d_req = 1'b0; d_nrw = 1'b0; cop_req = 1'b0; cop_type = 1'b0;
  endtask

  task automatic cop_write(input cfd_reg_e r, input logic [XLEN-1:0] v);
    new_cycle();
    cop_req = 1'b1; cop_type = 1'b1; cop_numb = COP_NUMB_W'(r); cop_wdata = v;
  endtask

  task automatic cop_read(input cfd_reg_e r, output logic [XLEN-1:0] v);
    new_cycle();
    cop_req = 1'b1; cop_type = 1'b0; cop_numb = COP_NUMB_W'(r);
    #1 v = cop_rdata;
  endtask

  task automatic step();
    logic [1:0] slot;
    slot   = pc[3:2];
    i_req  = 1'b1;
    i_addr = pc;
    i_data = pc ^ 32'hA500_0000;
    if (slot == 2'd3) begin
      d_req   = 1'b1;
      d_nrw   = 1'b1;
      d_addr  = 32'h1000 + {pc[9:4], 2'b00};
      d_wdata = gpr[1];
      dmem[widx(d_addr)] = gpr[1];
    end else begin
      gpr[slot + 1] = gpr[slot + 1] + 1;
    end
    pc = (pc + 4) & 32'hFF;
    retired++;
  endtask

  task automatic monitor();
    mmcr_t           m;
    logic [XLEN-1:0] v, a;
    exception_ack = 1'b1;
    epc = pc;
    entries++;
    cop_write(CFD_RDATA, epc);
    cop_write(CFD_MMCR, XLEN'(1 << MMCR_CACK));
    forever begin
      cop_read(CFD_MMCR, v);
      m = mmcr_t'(v[MMCR_W-1:0]);
      if (!m.d_ack) continue;
      if (m.ss_end) begin
        new_cycle();
        exception_ack = 1'b0;
        pc = epc;
        n_exit++;
        return;
      end
      if (m.ps) begin
        if (m.rw) begin cop_read(CFD_WDATA, v); psr = v; n_ps_w++; end
        else      begin cop_write(CFD_RDATA, psr); n_ps_r++; end
      end else if (m.rm) begin
        cop_read(CFD_ADDR, a);
        if (m.rw) begin
          cop_read(CFD_WDATA, v);
          new_cycle();
          d_req = 1'b1; d_nrw = 1'b1; d_addr = a; d_wdata = v;
          dmem[widx(a)] = v;
          n_mem_w++;
        end else begin
          new_cycle();
          d_req = 1'b1; d_nrw = 1'b0; d_addr = a; d_rdata = dmem[widx(a)];
          v = dmem[widx(a)];
          cop_write(CFD_RDATA, v);
          n_mem_r++;
        end
      end else begin
        if (m.rw) begin cop_read(CFD_WDATA, v); gpr[m.regnum] = v; n_reg_w++; end
        else      begin cop_write(CFD_RDATA, gpr[m.regnum]); n_reg_r++; end
      end
      cop_write(CFD_MMCR, XLEN'(1 << MMCR_CACK));
    end
  endtask

  initial begin
    i_req = 1'b0; i_addr = '0; i_data = '0;
    d_req = 1'b0; d_nrw = 1'b0; d_addr = '0; d_rdata = '0; d_wdata = '0;
    exception_ack = 1'b0;
    cop_req = 1'b0; cop_type = 1'b0; cop_numb = '0; cop_wdata = '0;
    for (int i = 0; i < 16; i++) gpr[i] = 32'(i) << 8;
    for (int i = 0; i < int'(MEM_WORDS); i++) dmem[i] = 32'hD000_0000 + 32'(i);
    psr = 32'h0000_0010;
    pc  = START_PC;
    epc = '0;
    wait (rst_n === 1'b1);
    forever begin
      new_cycle();
      if (ext_bkpt_en) monitor();
      else             step();
    end
  end

endmodule
