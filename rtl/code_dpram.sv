// code_dpram: the code, parameter and semaphore memory of one DSP node.
//
// 8K locations of 48 bits, built from three 8K x 16 dual-port RAMs. Port 1
// belongs to the control PC's program bus: it reaches one 16-bit device at a
// time, chosen by that device's chip select (device 0 holds bits 15:0,
// device 1 bits 31:16, device 2 bits 47:32). Port 2 belongs to the
// processor's program-memory bus and sees all 48 bits at once. Both ports
// read asynchronously, like the RAM chips, and write on their own clock.
//
// Semaphores: a PC write to the top location (8191) of device 0 raises
// dsp_int, the interrupt that tells the processor new parameters are ready;
// it is cleared when the processor reads that location. In the other
// direction a processor write to location 8190 raises pc_int, cleared when
// the PC reads location 8190 of device 0. The mailbox locations and the
// clearing rule follow common dual-port RAM practice and are this design's
// choice. The flags cross clock domains as toggles through two-flop
// synchronisers.
//
// The memory writes use plain always blocks because the two ports, on two
// clocks, write the same array, as a true dual-port RAM does.
module code_dpram #(
  parameter int unsigned AW = 13
) (
  input  logic          rst_n,
  // port 1: control PC, 16 bits
  input  logic          clk_pc,
  input  logic [2:0]    pc_cs,
  input  logic [AW-1:0] pc_addr,
  input  logic [15:0]   pc_wdata,
  input  logic          pc_we,
  input  logic          pc_re,
  output logic [15:0]   pc_rdata,
  output logic          pc_int,
  // port 2: processor, 48 bits
  input  logic          clk_dsp,
  input  logic          dsp_sel,
  input  logic [AW-1:0] dsp_addr,
  input  logic [47:0]   dsp_wdata,
  input  logic          dsp_we,
  input  logic          dsp_re,
  output logic [47:0]   dsp_rdata,
  output logic          dsp_int
);

  localparam logic [AW-1:0] MB_TO_DSP = '1;          // 8191
  localparam logic [AW-1:0] MB_TO_PC  = '1 - 1'b1;   // 8190

  logic [15:0] mem0 [2**AW];
  logic [15:0] mem1 [2**AW];
  logic [15:0] mem2 [2**AW];

  // port 1 writes
  always @(posedge clk_pc) begin
    if (pc_we && pc_cs[0]) mem0[pc_addr] <= pc_wdata;
    if (pc_we && pc_cs[1]) mem1[pc_addr] <= pc_wdata;
    if (pc_we && pc_cs[2]) mem2[pc_addr] <= pc_wdata;
  end

  // port 2 writes
  always @(posedge clk_dsp) begin
    if (dsp_sel && dsp_we) begin
      mem0[dsp_addr] <= dsp_wdata[15:0];
      mem1[dsp_addr] <= dsp_wdata[31:16];
      mem2[dsp_addr] <= dsp_wdata[47:32];
    end
  end

  always_comb begin
    unique case (1'b1)
      pc_cs[0]: pc_rdata = mem0[pc_addr];
      pc_cs[1]: pc_rdata = mem1[pc_addr];
      pc_cs[2]: pc_rdata = mem2[pc_addr];
      default:  pc_rdata = '0;
    endcase
  end
  assign dsp_rdata = {mem2[dsp_addr], mem1[dsp_addr], mem0[dsp_addr]};

  // semaphore PC -> DSP
  logic set_d_tgl, clr_d_tgl, set_d_s1, set_d_s2;
  logic set_p_tgl, clr_p_tgl, set_p_s1, set_p_s2;

  always_ff @(posedge clk_pc or negedge rst_n) begin
    if (!rst_n) begin
      set_d_tgl <= 1'b0;
      clr_p_tgl <= 1'b0;
      set_p_s1  <= 1'b0;
      set_p_s2  <= 1'b0;
    end else begin
      set_p_s1 <= set_p_tgl;
      set_p_s2 <= set_p_s1;
      if (pc_we && pc_cs[0] && pc_addr == MB_TO_DSP) set_d_tgl <= ~set_d_tgl;
      if (pc_re && pc_cs[0] && pc_addr == MB_TO_PC && pc_int) clr_p_tgl <= set_p_s2;
    end
  end

  always_ff @(posedge clk_dsp or negedge rst_n) begin
    if (!rst_n) begin
      set_p_tgl <= 1'b0;
      clr_d_tgl <= 1'b0;
      set_d_s1  <= 1'b0;
      set_d_s2  <= 1'b0;
    end else begin
      set_d_s1 <= set_d_tgl;
      set_d_s2 <= set_d_s1;
      if (dsp_sel && dsp_we && dsp_addr == MB_TO_PC) set_p_tgl <= ~set_p_tgl;
      if (dsp_sel && dsp_re && dsp_addr == MB_TO_DSP && dsp_int) clr_d_tgl <= set_d_s2;
    end
  end

  assign dsp_int = (set_d_s2 != clr_d_tgl);
  assign pc_int  = (set_p_s2 != clr_p_tgl);

  a_one_cs: assert property (@(posedge clk_pc) disable iff (!rst_n) $onehot0(pc_cs))
    else $error("code_dpram: more than one device selected");

endmodule
