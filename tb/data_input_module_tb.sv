// data_input_module_tb: feeds six spectra at the full size: two ramp spectra
// (every voltage component of channel c equals c, so adjacent channels form a
// ramp from 0 to 255, as in a bench test of the module at full speed), two
// of random dual-polarisation voltages, one random one in pass-through mode,
// and a last one with the module disabled. For every node path it checks the
// I, Q, U, V words of its 32 channels against the Stokes equations evaluated
// here, the word order, the steady rate of one word per two clocks, that all
// eight paths start each spectrum within eight clocks of each other, and the
// latency of the first word (NCH + 5 clocks after channel 0 enters).
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module data_input_module_tb;
  import spps_pkg::*;

  localparam int NCH = 256, NN = 8, CPN = NCH / NN, NSPEC = 5;

  logic clk = 0, rst_n = 0;
  logic enable = 1, pass_through = 0, in_valid = 0, in_sof = 0;
  pol_sample_t in_data = '0;
  sm16_t node_data [NN];
  logic  node_wr [NN];
  int checks = 0, failures = 0;
  int cyc = 0;
  pol_sample_t spec [NSPEC][NCH];
  bit pass_of [NSPEC];
  int sof_cyc [NSPEC];
  int nwords [NN];
  int last_wr [NN];
  int first_wr [NSPEC][NN];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  data_input_module #(.NCH(NCH), .NNODES(NN)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic int sval(sm9_t x);
    return x.sign ? -int'(x.mag) : int'(x.mag);
  endfunction

  function automatic sm16_t to_sm(int x);
    int a;
    a = (x < 0) ? -x : x;
    return '{sign: (x < 0), mag: 15'(a / 4)};
  endfunction

  function automatic sm16_t raw(sm9_t x);
    return '{sign: x.sign, mag: 15'(x.mag)};
  endfunction

  // expected word w (0=I,1=Q,2=U,3=V) of a channel
  function automatic sm16_t expect_word(pol_sample_t p, bit pass, int w);
    int lr, li, rr, ri, sl, sr;
    if (pass) begin
      case (w)
        0: return raw(p.lr);
        1: return raw(p.li);
        2: return raw(p.rr);
        default: return raw(p.ri);
      endcase
    end
    lr = sval(p.lr); li = sval(p.li); rr = sval(p.rr); ri = sval(p.ri);
    sl = (li * li + lr * lr) / 2;
    sr = (ri * ri + rr * rr) / 2;
    case (w)
      0: return to_sm(sl + sr);
      1: return to_sm(lr * rr + li * ri);
      2: return to_sm(li * rr - lr * ri);
      default: return to_sm(sl - sr);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    for (int n = 0; n < NN; n++) begin
      if (rst_n && node_wr[n]) begin
        automatic int k = nwords[n];
        automatic int s = k / (4 * CPN);
        automatic int slot = (k / 4) % CPN;
        automatic int w = k % 4;
        if (s < NSPEC) begin
          check(node_data[n] == expect_word(spec[s][n * CPN + slot], pass_of[s], w),
                $sformatf("node %0d spectrum %0d channel %0d word %0d", n, s, n * CPN + slot, w));
          if (k % (4 * CPN) != 0) check(cyc == last_wr[n] + 2, "one word every two clocks");
          if (k % (4 * CPN) == 0) first_wr[s][n] = cyc;
          if (n == 0 && k % (4 * CPN) == 0)
            check(cyc == sof_cyc[s] + NCH + 5, $sformatf("latency %0d", cyc - sof_cyc[s]));
        end else check(0, "words from the disabled spectrum");
        last_wr[n] = cyc;
        nwords[n]++;
      end
    end
  end

  initial begin
    for (int n = 0; n < NN; n++) nwords[n] = 0;
    for (int s = 0; s < NSPEC; s++) begin
      pass_of[s] = (s == 4);
      for (int c = 0; c < NCH; c++)
        if (s < 2) spec[s][c] = '{lr: '{1'b0, 8'(c)}, li: '{1'b0, 8'(c)}, rr: '{1'b0, 8'(c)}, ri: '{1'b0, 8'(c)}};
        else       spec[s][c] = pol_sample_t'({$urandom, $urandom});
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s <= NSPEC; s++)
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (c == 0);
        enable = (s < NSPEC);
        pass_through = (s < NSPEC) ? pass_of[s] : 1'b0;
        in_data = (s < NSPEC) ? spec[s][c] : pol_sample_t'({$urandom, $urandom});
        if (c == 0 && s < NSPEC) sof_cyc[s] = cyc + 1;
      end
    @(negedge clk) in_valid = 0;
    repeat (2 * NCH) @(posedge clk);
    for (int n = 0; n < NN; n++)
      check(nwords[n] == NSPEC * 4 * CPN, $sformatf("node %0d got %0d words", n, nwords[n]));
    for (int sp = 0; sp < NSPEC; sp++)
      for (int n = 1; n < NN; n++)
        check(first_wr[sp][n] - first_wr[sp][0] >= 0 && first_wr[sp][n] - first_wr[sp][0] < NN,
              $sformatf("spectrum %0d: path %0d starts with path 0", sp, n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
