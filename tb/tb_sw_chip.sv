// tb_sw_chip: streams 40 consecutive beam crossings of random 9 x 9 tower
// maps (sparse, with many equal values to exercise the >= / > tie rule,
// and some saturating maps) into the chip bit-serially and compares every
// window result with the software reference.  Checks the result latency
// (7 clocks after the input frame) and counts jets, EM, taus, ties and
// saturations seen.
module tb_sw_chip;
  import l1cal_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, sof, eof;
  logic [SW_REG-1:0][SW_REG-1:0] em, hd;
  sw_cfg_t cfg;
  logic res_valid; win_result_t [15:0] res;
  int checks = 0, failures = 0;
  int njet = 0, nem = 0, ntau = 0, nsat = 0, nties = 0;

  sw_chip dut (.*);
  always #5 clk = ~clk;

  localparam int NBC = 40;
  localparam int E0 = 10, P0 = 10;      // region placed in a zero map
  tmap_t mem_em [NBC], mem_hd [NBC];
  int cyc = 0, bcn;
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int rnd_tower(int style);
    int r; r = $urandom % 100;
    if (style == 2) return 255;
    if (r < 55) return 0;
    if (r < 80) return 1 + $urandom % 3;
    if (r < 95) return 10 + $urandom % 20;
    return $urandom % 256;
  endfunction

  initial begin
    for (int n = 0; n < NBC; n++) begin
      int style; style = (n % 10 == 7) ? 2 : 0;
      for (int e = 0; e < 40; e++) for (int p = 0; p < 32; p++) begin mem_em[n][e][p] = 0; mem_hd[n][e][p] = 0; end
      for (int i = 0; i < SW_REG; i++) for (int j = 0; j < SW_REG; j++) begin
        mem_em[n][E0+i][P0+j] = rnd_tower(style);
        mem_hd[n][E0+i][P0+j] = (n % 10 == 3) ? 0 : rnd_tower(style) / 2;
        if (n % 3 == 1) begin        // isolated electromagnetic deposits
          mem_em[n][E0+i][P0+j] = ($urandom % 20 == 0) ? 40 + $urandom % 200 : int'($urandom % 6 == 0);
          mem_hd[n][E0+i][P0+j] = int'($urandom % 4 == 0);
        end
      end
    end
  end

  // bit-serial stimulus: bit k of each crossing in clock k of its frame
  int bitn;
  always_comb begin
    bitn = cyc % BS_W; bcn = cyc / BS_W - 1;   // crossing -1 is empty
    sof = (bitn == 0); eof = (bitn == BS_W - 1);
    for (int i = 0; i < SW_REG; i++) for (int j = 0; j < SW_REG; j++) begin
      em[i][j] = (bcn >= 0 && bcn < NBC && bitn < 8) ? 1'(mem_em[bcn][E0+i][P0+j] >> bitn) : 1'b0;
      hd[i][j] = (bcn >= 0 && bcn < NBC && bitn < 8) ? 1'(mem_hd[bcn][E0+i][P0+j] >> bitn) : 1'b0;
    end
  end

  int got = 0;
  always @(posedge clk) if (rst_n && res_valid) begin
    int n;
    n = got - 1;  got++;
    checks++;
    if ((cyc - 7) % BS_W != BS_W - 1) begin failures++; $display("FAIL latency"); end
    if (n >= 0 && n < NBC) begin
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin
        ref_win_t r; win_result_t d;
        r = window(mem_em[n], mem_hd[n], E0 + 2 + a, P0 + 2 + b,
                   int'(cfg.em_iso_max), int'(cfg.em_had_max), int'(cfg.tau_ratio));
        d = res[a*4 + b];
        checks++;
        if (d.jet != r.jet || int'(d.jet_et) != r.jet_et || d.tau != r.tau ||
            d.em != r.em || int'(d.em_et) != r.em_et) begin
          failures++;
          $display("FAIL bc %0d win %0d,%0d: dut jet %b %0d tau %b em %b %0d ref jet %b %0d tau %b em %b %0d",
                   n, a, b, d.jet, d.jet_et, d.tau, d.em, d.em_et, r.jet, r.jet_et, r.tau, r.em, r.em_et);
        end
        njet += r.jet; nem += r.em; ntau += r.tau;
        if (r.jet_et == 4095) nsat++;
        if (blk(mem_em[n], mem_hd[n], 0, E0+2+a, P0+2+b, 2) == blk(mem_em[n], mem_hd[n], 0, E0+2+a-1, P0+2+b, 2) &&
            blk(mem_em[n], mem_hd[n], 0, E0+2+a, P0+2+b, 2) > 0) nties++;
      end
    end
  end

  initial begin
    cfg.em_iso_max = 12'd40; cfg.em_had_max = 12'd6; cfg.tau_ratio = 5'd10;
    @(negedge clk); rst_n = 1;
    wait (got == NBC + 1);
    $display("jets %0d em %0d tau %0d saturated %0d ties %0d", njet, nem, ntau, nsat, nties);
    checks++;
    if (njet < 10 || nem < 3 || ntau < 3 || nsat < 3 || nties < 3) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (BS_W * (NBC + 30)) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
