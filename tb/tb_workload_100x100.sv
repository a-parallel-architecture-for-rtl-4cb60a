// tb_workload_100x100: the 100 x 100 camera image of the worked example,
// reduced by f_l = f_c = 4 (625 retained pixels, 25 x 25 corrected image),
// through one correction channel set to that size. Random tables as in
// tb_correction_channel; two frames, the second with gaps in pix_valid;
// every write checked for cycle, address and grey value, and the corrected
// image read back.
module tb_workload_100x100;
  import rectif_pkg::*;
  localparam int NL = 100, NC = 100, HR = NL / 4, WR = NC / 4, NPIX = HR * WR;

  logic clk = 0, rst = 1, frame_start = 0, pix_valid = 0;
  logic [7:0] grey = 0;
  logic ld_we = 0;
  ld_sel_e ld_sel = LD_ADDR_TABLE;
  logic [14:0] ld_addr = 0, img_raddr = 0;
  logic [15:0] ld_data = 0;
  logic [7:0] img_rdata, wr_data;
  logic sample, wr_en;
  logic [14:0] wr_addr;

  correction_channel #(.NL(NL), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_active = 0, n_passive = 0, n_neg = 0, n_dup = 0, n_writes = 0, n_samples = 0;
  bit act [NPIX];
  int tu [NPIX][3], tv [NPIX][3];     // target positions of the correspondents
  logic [7:0] img [NPIX];
  int cycle = 0, k_seen = 0;

  typedef struct { int t; int addr; logic [7:0] g; } wr_t;
  wr_t q [$];

  function automatic logic [7:0] enc(int d);
    return d < 0 ? {1'b1, 7'(-d)} : {1'b0, 7'(d)};
  endfunction

  task automatic load(ld_sel_e s, int a, logic [15:0] d);
    @(negedge clk); ld_we = 1; ld_sel = s; ld_addr = 15'(a); ld_data = d;
    @(negedge clk); ld_we = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: sampling impulses create expected writes; writes are checked.
  int k_line [NPIX], k_col [NPIX];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && sample) begin
      int k, u, v;
      k = k_seen % NPIX;
      u = k_line[k] / 4; v = k_col[k] / 4;
      n_samples++;
      if (act[k])
        for (int j = 0; j < 3; j++) q.push_back('{cycle + 6 + j, tu[k][j] * WR + tv[k][j], grey});
      k_seen++;
    end
    if (!rst) begin
      if (wr_en) begin
        n_writes++;
        checks++;
        if (q.size() == 0) begin failures++; $display("unexpected write at %0d", cycle); end
        else begin
          wr_t e;
          e = q.pop_front();
          if (e.t != cycle || e.addr != int'(wr_addr) || e.g != wr_data) begin
            failures++; $display("write at %0d addr %0d data %h, expected at %0d addr %0d data %h", cycle, wr_addr, wr_data, e.t, e.addr, e.g);
          end else img[e.addr] = e.g;
        end
      end else if (q.size() != 0 && q[0].t <= cycle) begin
        failures++; checks++; $display("missing write at %0d", cycle); void'(q.pop_front());
      end
    end
  end

  initial begin
    foreach (img[i]) img[i] = 0;
    // Retained pixels in order: P mod 16 = 15.
    begin
      int k = 0;
      for (int p = 0; p < NL * NC; p++)
        if (p % 16 == 15) begin k_line[k] = p / NC; k_col[k] = p % NC; k++; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // Tables.
    for (int k = 0; k < NPIX; k++) begin
      int u, v, nd;
      logic [15:0] w [3];
      u = k_line[k] / 4; v = k_col[k] / 4;
      act[k] = ($urandom_range(3) != 0);
      nd = $urandom_range(3, 1);
      for (int j = 0; j < 3; j++) begin
        if (j < nd) begin tu[k][j] = $urandom_range(HR - 1); tv[k][j] = $urandom_range(WR - 1); end
        else begin tu[k][j] = tu[k][j-1]; tv[k][j] = tv[k][j-1]; end
        w[j] = {enc(tu[k][j] - u), enc(tv[k][j] - v)};
        if (act[k] && (tu[k][j] < u || tv[k][j] < v)) n_neg++;
      end
      if (act[k]) begin n_active++; if (nd < 3) n_dup++; end else n_passive++;
      load(LD_ADDR_TABLE, k, {act[k], 1'b0, 14'(100 + 7 * k)});
      load(LD_MEM1, 100 + 7 * k, w[0]);
      load(LD_MEM2, 100 + 7 * k, w[1]);
      load(LD_MEM3, 100 + 7 * k, w[2]);
    end
    // Two frames.
    for (int fr = 0; fr < 2; fr++)
      for (int l = 0; l < NL; l++)
        for (int c = 0; c < NC; c++) begin
          if (fr == 1) while ($urandom_range(3) == 0) begin
            @(negedge clk); pix_valid = 0; frame_start = 0;
          end
          @(negedge clk);
          pix_valid = 1; frame_start = (l == 0 && c == 0); grey = 8'($urandom);
        end
    @(negedge clk); pix_valid = 0; frame_start = 0;
    repeat (20) @(negedge clk);
    // Read back the corrected image.
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk); img_raddr = 15'(a);
      @(negedge clk);
      checks++;
      if (img_rdata != img[a]) begin failures++; $display("image[%0d] = %h expected %h", a, img_rdata, img[a]); end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d writes never happened", q.size()); end
    checks++;
    if (n_samples != 2 * NPIX) begin failures++; $display("%0d impulses", n_samples); end
    $display("mechanisms: impulses=%0d active=%0d passive=%0d duplicate=%0d negative=%0d writes=%0d",
             n_samples, n_active, n_passive, n_dup, n_neg, n_writes);
    if (n_active == 0 || n_passive == 0 || n_dup == 0 || n_neg == 0 || n_writes == 0) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
