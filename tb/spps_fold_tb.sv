// spps_fold_tb: end-to-end pulse-folding run of one sub-band at its default
// sizes.
//
// The front end sends a periodic test pulse: every P-th spectrum carries
// large random voltages in all channels (a pulse one frame wide), the others
// carry small random noise. Each node processor model folds its input at the
// pulse period: the word of frame f, channel slot c and Stokes parameter s
// is added into SRAM-A at ((c * NB) + f mod NB) * 4 + s, so every channel
// gets an NB-bin profile of all four Stokes parameters. After the last
// frame the processor copies the profiles to SRAM-B and raises BUS-FREE.
//
// The collector is programmed for a reversed node order (7 down to 0) and
// RATE = 1, so one location takes 16 clocks; the testbench checks that
// spacing on the recorder port. The PC turns acquisition on once every node
// shows BUS-FREE, so the nodes are served in exactly the programmed order. The whole result (8 nodes x 1024 locations
// = 16384 16-bit words) fills exactly half of the result FIFO; the PC waits
// for the half-full flag and then reads the block over ISA. Every profile
// value is compared with sums worked out here, and the pulse must stand out
// in bin 0 of every channel's I profile.
//
// Sizes: P = NB = 8 frames and 32 periods (256 spectra). The period, the
// number of bins and the number of periods are the testbench's choice,
// scaled down from a longer folding run to keep the simulation short.
module spps_fold_tb;
  import spps_pkg::*;

  localparam int NN = N_NODES, NCH = N_CHAN, CPN = NCH / NN;
  localparam int NB = 8;                      // bins = pulse period in frames
  localparam int NPER = 32;                   // periods folded
  localparam int NSPEC = NB * NPER;
  localparam int NWORDS = NSPEC * CPN * 4;    // words per node
  localparam int NRES = CPN * NB * 4;         // result locations per node
  localparam longint RATE = 1;
  localparam longint LOC_CLKS = 8 * (RATE + 1);   // clocks per location

  logic clk_dim = 0, clk_dsp = 0, clk_rcm = 0, clk_pc = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, pass_through = 0;
  pol_sample_t in_data = '0;
  logic pb_page_ld = 0, pb_wr = 0, pb_rd = 0;
  logic [12:0] pb_addr = 0;
  logic [15:0] pb_wdata = 0, pb_rdata;
  logic [NN-1:0] pb_int;
  logic [23:0] pm_addr [NN];
  logic [47:0] pm_wdata [NN], pm_rdata [NN];
  logic pm_rd [NN], pm_wr [NN];
  logic [21:0] dm_addr [NN];
  logic [31:0] dm_wdata [NN], dm_rdata [NN];
  logic dm_rd [NN], dm_wr [NN];
  logic [NN-1:0] irq_engaged, irq_param, fifo_half_full;
  logic [19:0] isa_sa = 0;
  logic [15:0] isa_sd_in = 0, isa_sd_out;
  logic isa_sd_oe, isa_aen = 1, isa_memw_n = 1, isa_memr_n = 1, isa_memcs16_n, isa_zerows_n;
  logic [3:0] dim_configured = 4'hF, configure_dim;
  logic acquire_enable;
  logic [15:0] rec_data;
  logic rec_wr, rcm_fifo_empty, rcm_fifo_hf, rcm_fifo_pafe;

  int checks = 0, failures = 0;
  pol_sample_t spec [NSPEC][NCH];
  longint expect_sum [NN][NRES];
  longint got [NN][NRES];
  logic [15:0] rec [$];
  longint rec_cyc [$];
  longint cyc = 0;

  // mechanism counters
  int n_half_full = 0, n_engage = 0, n_irq_engaged = 0, n_rcm_hf = 0, n_skip_poll = 0;
  int first_node = -1;

  always #31.25 clk_dim = ~clk_dim;
  always #20    clk_dsp = ~clk_dsp;
  always #50    clk_pc  = ~clk_pc;
  initial begin #7; forever #31.25 clk_rcm = ~clk_rcm; end
  wire clk = clk_rcm;           // for the ISA host tasks

  spps_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  `include "isa_host.svh"

  // ---------------- reference model of the Stokes stage ----------------
  function automatic int sval(sm9_t x);
    return x.sign ? -int'(x.mag) : int'(x.mag);
  endfunction

  function automatic int trunc4(int x);   // sign-magnitude value of x/4
    return (x < 0) ? -((-x) / 4) : x / 4;
  endfunction

  function automatic int stokes_value(pol_sample_t p, bit pass, int w);
    int lr, li, rr, ri, sl, sr;
    lr = sval(p.lr); li = sval(p.li); rr = sval(p.rr); ri = sval(p.ri);
    if (pass) return (w == 0) ? lr : (w == 1) ? li : (w == 2) ? rr : ri;
    sl = (li * li + lr * lr) / 2;
    sr = (ri * ri + rr * rr) / 2;
    case (w)
      0: return trunc4(sl + sr);
      1: return trunc4(lr * rr + li * ri);
      2: return trunc4(li * rr - lr * ri);
      default: return trunc4(sl - sr);
    endcase
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    #80ms;
    failures++;
    $display("watchdog expired: halffull=%0d engage=%0d irq_engaged=%0d rec=%0d", n_half_full, n_engage, n_irq_engaged, rec.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor bus helpers ----------------
  task automatic pm_read(int n, logic [23:0] a, output logic [47:0] d);
    @(negedge clk_dsp);
    pm_addr[n] = a; pm_rd[n] = 1;
    #1 d = pm_rdata[n];
    @(negedge clk_dsp);
    pm_rd[n] = 0;
  endtask

  task automatic pm_write(int n, logic [23:0] a, logic [47:0] d);
    @(negedge clk_dsp);
    pm_addr[n] = a; pm_wdata[n] = d; pm_wr[n] = 1;
    @(negedge clk_dsp);
    pm_wr[n] = 0;
  endtask

  task automatic dm_write(int n, logic [21:0] a, logic [31:0] d);
    @(negedge clk_dsp);
    dm_addr[n] = a; dm_wdata[n] = d; dm_wr[n] = 1;
    @(negedge clk_dsp);
    dm_wr[n] = 0;
  endtask

  task automatic dm_read(int n, logic [21:0] a, output logic [31:0] d);
    @(negedge clk_dsp);
    dm_addr[n] = a; dm_rd[n] = 1;
    #1 d = dm_rdata[n];
    @(negedge clk_dsp);
    dm_rd[n] = 0;
  endtask

  // ---------------- node processor model: folding ----------------
  task automatic node_program(int n);
    logic [47:0] w;
    logic [31:0] r;
    int frame, slot, st, a;
    for (a = 0; a < NRES; a++) dm_write(n, 22'(a), 32'h0);
    wait (fifo_half_full[n]);
    n_half_full++;
    for (int k = 0; k < NWORDS; k++) begin
      while (1) begin
        dm_read(n, 22'h20_0000, r);
        if (!r[0]) break;
      end
      pm_read(n, 24'h80_0000, w);
      frame = k / (CPN * 4);
      slot  = (k / 4) % CPN;
      st    = k % 4;
      a     = (slot * NB + frame % NB) * 4 + st;
      dm_read(n, 22'(a), r);
      dm_write(n, 22'(a), r + w[47:16]);
    end
    dm_write(n, 22'h30_0000, 32'h1);
    for (a = 0; a < NRES; a++) begin
      dm_read(n, 22'(a), r);
      dm_write(n, 22'h10_0000 + 22'(a), r);
    end
    dm_write(n, 22'h30_0000, 32'h2);
    @(posedge irq_engaged[n]);
    n_irq_engaged++;
    dm_write(n, 22'h30_0000, 32'h4);
  endtask

  bit go = 0;
  int nodes_done = 0;
  for (genvar g = 0; g < NN; g++) begin : g_proc
    initial begin
      wait (go);
      node_program(g);
      nodes_done++;
    end
  end

  logic [NN-1:0] eng_d = 0;
  always @(posedge clk_rcm) if (rst_n) begin
    cyc++;
    eng_d <= dut.u_rcm.u_seq.engaged;
    n_engage += $countones(dut.u_rcm.u_seq.engaged & ~eng_d);
    if (first_node < 0 && dut.u_rcm.u_seq.engaged != 0)
      for (int n = 0; n < NN; n++) if (dut.u_rcm.u_seq.engaged[n]) first_node = n;
    if (dut.u_rcm.u_seq.mode == 1 && !dut.u_rcm.u_seq.busfree_s2[dut.u_rcm.u_seq.cur_node])
      n_skip_poll++;
    if (rec_wr) begin rec.push_back(rec_data); rec_cyc.push_back(cyc); end
  end
  always @(posedge rcm_fifo_hf) n_rcm_hf++;

  function automatic sm9_t rnd9(int maxmag, int minmag);
    sm9_t x;
    x.sign = 1'($urandom);
    x.mag  = 8'(minmag + $urandom_range(maxmag - minmag));
    return x;
  endfunction

  initial begin
    logic [15:0] r16;
    int order [NN];
    for (int n = 0; n < NN; n++) begin
      pm_addr[n] = 0; pm_wdata[n] = 0; pm_rd[n] = 0; pm_wr[n] = 0;
      dm_addr[n] = 0; dm_wdata[n] = 0; dm_rd[n] = 0; dm_wr[n] = 0;
      for (int a = 0; a < NRES; a++) expect_sum[n][a] = 0;
    end
    for (int s = 0; s < NSPEC; s++)
      for (int c = 0; c < NCH; c++) begin
        automatic bit pulse = (s % NB == 0);
        spec[s][c].lr = pulse ? rnd9(255, 128) : rnd9(7, 0);
        spec[s][c].li = pulse ? rnd9(255, 128) : rnd9(7, 0);
        spec[s][c].rr = pulse ? rnd9(255, 128) : rnd9(7, 0);
        spec[s][c].ri = pulse ? rnd9(255, 128) : rnd9(7, 0);
        for (int w = 0; w < 4; w++)
          expect_sum[c / CPN][((c % CPN) * NB + s % NB) * 4 + w] += longint'(stokes_value(spec[s][c], 1'b0, w));
      end
    repeat (4) @(posedge clk_pc);
    rst_n = 1;
    repeat (4) @(posedge clk_pc);

    // collector: rate 1, locations 0..NRES-1, nodes 7, 6, ..., 0
    isa_write(20'hD8002, 16'(RATE));
    isa_write(20'hD8004, 16'h0000); isa_write(20'hD8006, 16'h0000);
    isa_write(20'hD8008, 16'(NRES - 1)); isa_write(20'hD800A, 16'h0000);
    isa_write(20'hD800C, 16'hCDEF); isa_write(20'hD800E, 16'h89AB);
    isa_write(20'hD8000, 16'h0002);         // enable DIM only
    repeat (4) @(posedge clk_dim);

    fork
      begin
        for (int s = 0; s < NSPEC; s++)
          for (int c = 0; c < NCH; c++) begin
            @(negedge clk_dim);
            in_valid = 1; in_sof = (c == 0); in_data = spec[s][c];
          end
        @(negedge clk_dim) in_valid = 0;
      end
      begin
        go = 1;
        wait (dut.busfree == '1);
      end
    join
    // every node has its profiles in SRAM-B: start the collector now, so it
    // follows the programmed node order from its first entry
    isa_write(20'hD8000, 16'h0003);
    wait (nodes_done == NN);

    // the PC starts a block transfer when the result FIFO is half full
    wait (rcm_fifo_hf);
    repeat (20) @(posedge clk_rcm);
    check(rec.size() == NN * NRES * 2, "whole result block collected at half full");
    for (int i = 0; i < NN; i++) order[i] = NN - 1 - i;
    for (int i = 0; i < NN; i++) begin
      automatic int n = order[i];
      for (int a = 0; a < NRES; a++) begin
        logic [15:0] lo, hi;
        isa_read(20'hD0000, lo);
        isa_read(20'hD0000, hi);
        check($signed({hi, lo}) == 32'(expect_sum[n][a]),
              $sformatf("node %0d location %0d: got %0d want %0d", n, a, $signed({hi, lo}), expect_sum[n][a]));
        got[n][a] = longint'($signed({hi, lo}));
      end
    end
    // bin 0 of every channel's I profile holds the folded pulse
    for (int n = 0; n < NN; n++)
      for (int c = 0; c < CPN; c++)
        for (int b = 1; b < NB; b++)
          check(got[n][c * NB * 4] > 4 * got[n][(c * NB + b) * 4], "pulse stands out in bin 0");
    isa_read(20'hD8010, r16);
    check(r16[12] == 1, "result FIFO empty after the block transfer");

    // one location every 8 * (RATE + 1) clocks within a node's block
    for (int i = 0; i + 1 < NN * NRES; i++)
      if ((i + 1) % NRES != 0)
        check(rec_cyc[2 * i + 2] - rec_cyc[2 * i] == LOC_CLKS, "collection rate");

    check(first_node == NN - 1, "node sequence starts with node 7");
    check(n_half_full == NN, "FIFO half-full on every node");
    check(n_engage == NN, "each node engaged once");
    check(n_irq_engaged == NN, "ENGAGED interrupt on every node");
    check(n_rcm_hf == 1, "result FIFO half-full flag");
    $display("mechanisms: halffull=%0d engage=%0d irq_engaged=%0d rcm_hf=%0d skip_poll=%0d first_node=%0d",
             n_half_full, n_engage, n_irq_engaged, n_rcm_hf, n_skip_poll, first_node);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
