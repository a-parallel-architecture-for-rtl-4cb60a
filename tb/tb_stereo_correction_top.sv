// tb_stereo_correction_top: end-to-end test of the stereo top at its default
// size (two 656 x 492 cameras, 20172 retained pixels per frame each).
//
// For each channel random tables are generated and loaded: about a quarter
// of the retained pixels are passive; each active pixel gets its own
// correspondents address and one, two or three distinct correspondents
// (duplicates repeat the last) within +/-6 reduced pixels, so displacements
// of both signs occur. One full frame is then streamed into both cameras,
// the right one starting 5 cycles after the left. Every corrected-image
// write is checked for cycle (6, 7, 8 cycles after its sampling impulse),
// address and grey value; impulses must come exactly every 16 cycles; both
// corrected images are read back and compared with this testbench's
// reference. Counted mechanisms, each required at least once per channel:
// sampling impulses, active and passive pixels, address-table words read from
// RAM_P (index >= 16384), duplicated correspondents, negative displacements,
// writes.
module tb_stereo_correction_top;
  import rectif_pkg::*;
  localparam int NPIX = H_RED * W_RED;          // 20172
  localparam int NFRAME = N_L * N_C;            // 322752
  localparam int SKEW = 5;

  logic clk = 0, rst = 1;
  logic [1:0] frame_start = 0, pix_valid = 0, ld_we = 0;
  logic [1:0][7:0] grey = 0;
  ld_sel_e ld_sel = LD_ADDR_TABLE;
  logic [14:0] ld_addr = 0, img_raddr = 0;
  logic [15:0] ld_data = 0;
  logic [1:0][7:0] img_rdata, wr_data;
  logic [1:0] sample, wr_en;
  logic [1:0][14:0] wr_addr;

  stereo_correction_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_samples [2], n_active [2], n_passive [2], n_ramp [2], n_dup [2], n_neg [2], n_writes [2];
  bit act [2][NPIX];
  int tgt [2][NPIX][3];                 // target address of each correspondent
  logic [7:0] img [2][NPIX];
  int k_line [NPIX], k_col [NPIX];
  int cycle = 0;
  int k_seen [2], last_t [2];

  typedef struct { int t; int addr; logic [7:0] g; } wr_t;
  wr_t q0 [$], q1 [$];

  function automatic logic [7:0] enc(int d);
    return d < 0 ? {1'b1, 7'(-d)} : {1'b0, 7'(d)};
  endfunction

  function automatic logic [7:0] grey_of(int ch, int l, int c);
    return 8'((l * 7) ^ (c * 13) ^ (ch * 91));
  endfunction

  task automatic load(int ch, ld_sel_e s, int a, logic [15:0] d);
    @(negedge clk); ld_we = 2'(1 << ch); ld_sel = s; ld_addr = 15'(a); ld_data = d;
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_writes(int ch, int k, logic [7:0] g);
    for (int j = 0; j < 3; j++) begin
      if (ch == 0) q0.push_back('{cycle + 6 + j, tgt[0][k][j], g});
      else         q1.push_back('{cycle + 6 + j, tgt[1][k][j], g});
    end
  endtask

  task automatic check_write(int ch);
    wr_t e;
    int qs;
    qs = (ch == 0) ? q0.size() : q1.size();
    if (wr_en[ch]) begin
      n_writes[ch]++;
      checks++;
      if (qs == 0) begin failures++; $display("ch%0d unexpected write at %0d", ch, cycle); return; end
      e = (ch == 0) ? q0.pop_front() : q1.pop_front();
      if (e.t != cycle || e.addr != int'(wr_addr[ch]) || e.g != wr_data[ch]) begin
        failures++;
        $display("ch%0d write at %0d addr %0d data %h, expected at %0d addr %0d data %h",
                 ch, cycle, wr_addr[ch], wr_data[ch], e.t, e.addr, e.g);
      end else img[ch][e.addr] = e.g;
    end else if (qs != 0) begin
      e = (ch == 0) ? q0[0] : q1[0];
      if (e.t <= cycle) begin
        failures++; checks++; $display("ch%0d missing write at %0d", ch, cycle);
        if (ch == 0) void'(q0.pop_front()); else void'(q1.pop_front());
      end
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      for (int ch = 0; ch < 2; ch++) begin
        if (sample[ch]) begin
          int k;
          k = k_seen[ch];
          n_samples[ch]++;
          if (k >= int'(DEPTH_G)) n_ramp[ch]++;
          if (last_t[ch] >= 0) begin
            checks++;
            if (cycle - last_t[ch] != int'(F)) begin failures++; $display("ch%0d impulse interval %0d", ch, cycle - last_t[ch]); end
          end
          last_t[ch] = cycle;
          if (act[ch][k]) expect_writes(ch, k, grey[ch]);
          k_seen[ch]++;
        end
        check_write(ch);
      end
    end
  end

  initial begin
    for (int ch = 0; ch < 2; ch++) begin
      n_samples[ch] = 0; n_active[ch] = 0; n_passive[ch] = 0; n_ramp[ch] = 0;
      n_dup[ch] = 0; n_neg[ch] = 0; n_writes[ch] = 0; k_seen[ch] = 0; last_t[ch] = -1;
      for (int i = 0; i < NPIX; i++) img[ch][i] = 0;
    end
    // Retained pixels, in stream order: P mod 16 = 15.
    begin
      int k = 0;
      for (int p = 0; p < NFRAME; p++)
        if (p % int'(F) == int'(F) - 1) begin k_line[k] = p / int'(N_C); k_col[k] = p % int'(N_C); k++; end
      checks++;
      if (k != NPIX) failures++;
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // Tables.
    for (int ch = 0; ch < 2; ch++) begin
      int next_c;
      next_c = 0;
      for (int k = 0; k < NPIX; k++) begin
        int u, v, nd, tu, tv;
        logic [15:0] w [3];
        u = k_line[k] / 4; v = k_col[k] / 4;
        act[ch][k] = ($urandom_range(3) != 0) && (next_c < int'(DEPTH_C));
        if (act[ch][k]) begin
          nd = $urandom_range(3, 1);
          for (int j = 0; j < 3; j++) begin
            if (j < nd) begin
              tu = u + $urandom_range(12) - 6; tv = v + $urandom_range(12) - 6;
              if (tu < 0) tu = 0; if (tu >= int'(H_RED)) tu = H_RED - 1;
              if (tv < 0) tv = 0; if (tv >= int'(W_RED)) tv = W_RED - 1;
              if (tu < u || tv < v) n_neg[ch]++;
              w[j] = {enc(tu - u), enc(tv - v)};
              tgt[ch][k][j] = tu * int'(W_RED) + tv;
            end else begin
              w[j] = w[j-1];
              tgt[ch][k][j] = tgt[ch][k][j-1];
            end
          end
          n_active[ch]++;
          if (nd < 3) n_dup[ch]++;
          load(ch, LD_ADDR_TABLE, k, {1'b1, 1'b0, 14'(next_c)});
          load(ch, LD_MEM1, next_c, w[0]);
          load(ch, LD_MEM2, next_c, w[1]);
          load(ch, LD_MEM3, next_c, w[2]);
          next_c++;
        end else begin
          n_passive[ch]++;
          load(ch, LD_ADDR_TABLE, k, {1'b0, 1'b0, 14'($urandom)});
        end
      end
    end
    @(negedge clk); ld_we = 0;
    // One frame into both cameras, the right one SKEW cycles later.
    for (int t = 0; t < NFRAME + SKEW; t++) begin
      @(negedge clk);
      for (int ch = 0; ch < 2; ch++) begin
        int p;
        p = t - ch * SKEW;
        pix_valid[ch]   = (p >= 0 && p < NFRAME);
        frame_start[ch] = (p == 0);
        grey[ch]        = (p >= 0 && p < NFRAME) ? grey_of(ch, p / int'(N_C), p % int'(N_C)) : 8'h00;
      end
    end
    @(negedge clk); pix_valid = 0; frame_start = 0;
    repeat (20) @(negedge clk);
    // Read back both corrected images.
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk); img_raddr = 15'(a);
      @(negedge clk);
      for (int ch = 0; ch < 2; ch++) begin
        checks++;
        if (img_rdata[ch] != img[ch][a]) begin
          failures++;
          if (failures < 20) $display("ch%0d image[%0d] = %h expected %h", ch, a, img_rdata[ch], img[ch][a]);
        end
      end
    end
    for (int ch = 0; ch < 2; ch++) begin
      checks++;
      if (((ch == 0) ? q0.size() : q1.size()) != 0) begin failures++; $display("ch%0d writes never happened", ch); end
      checks++;
      if (n_samples[ch] != NPIX) begin failures++; $display("ch%0d: %0d impulses", ch, n_samples[ch]); end
      $display("ch%0d mechanisms: impulses=%0d active=%0d passive=%0d ram_p=%0d duplicate=%0d negative=%0d writes=%0d",
               ch, n_samples[ch], n_active[ch], n_passive[ch], n_ramp[ch], n_dup[ch], n_neg[ch], n_writes[ch]);
      checks++;
      if (n_samples[ch] == 0 || n_active[ch] == 0 || n_passive[ch] == 0 || n_ramp[ch] == 0 ||
          n_dup[ch] == 0 || n_neg[ch] == 0 || n_writes[ch] != 3 * n_active[ch]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
