// tb_lms_adapt: checks the LMS coefficient update block against a bit-exact
// integer model. Random error samples, FIR delay-line contents, tau-window
// side data (x, spline index, basis values, |x|^2 x) and step-size shifts are
// applied; after every clock the FIR taps w, the impairment coefficients h
// and the combinational spline step vector dq must equal the model. Clear
// and the update enable are exercised, and one update must land in exactly
// one clock.
module tb_lms_adapt;
  import edsic_pkg::*;
  localparam int M = 12, TAU = 5, M_PRE = 5, K = 8, Q = K + 2, EXTRA = 1;
  localparam int KLO = M_PRE - TAU / 2;
  logic clk = 0, rst_n = 0, clear = 0, upd = 0;
  sample_t e;
  logic [4:0] mu_w, mu_q, mu_h;
  sig_t s_line [M+EXTRA];
  sample_t win_x [TAU];
  logic [2:0] win_idx [TAU];
  logic [12:0] win_b [TAU][3];
  sig_t win_p [TAU];
  coef_t w [M];
  coef_t h [3];
  acc_t dq [Q];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lms_adapt #(.M(M), .TAU(TAU), .M_PRE(M_PRE), .K(K), .EXTRA(EXTRA)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint wr [M], wi [M], hr [3], hi [3];

  function automatic longint s32(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction
  function automatic longint s18(input longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction
  function automatic longint c(input longint a);   // accumulator -> datapath
    return s18(a >>> 13);
  endfunction

  longint gqr [Q], gqi [Q], ghr [3], ghi [3];

  task automatic model_grad();
    longint xr, xi, cr, ci, pr, pi, ar, ai;
    for (int m = 0; m < Q; m++) begin gqr[m] = 0; gqi[m] = 0; end
    for (int l = 0; l < 3; l++) begin ghr[l] = 0; ghi[l] = 0; end
    for (int i = 0; i < TAU; i++) begin
      cr = c(wr[KLO+i]); ci = c(wi[KLO+i]);
      xr = win_x[i].re; xi = win_x[i].im;
      pr = win_p[i].re; pi = win_p[i].im;
      ghr[0] += cr; ghi[0] -= ci;
      ghr[1] += (xr * cr + xi * ci) >>> 15;        // x conj(w)
      ghi[1] += (xi * cr - xr * ci) >>> 15;
      ghr[2] += (pr * cr + pi * ci) >>> 15;
      ghi[2] += (pi * cr - pr * ci) >>> 15;
      ar = s18((xr * cr - xi * ci) >>> 15);       // conj(x w)
      ai = s18(-((xr * ci + xi * cr) >>> 15));
      for (int j = 0; j < 3; j++) begin
        gqr[win_idx[i] + j] += (longint'(win_b[i][j]) * ar) >>> 12;
        gqi[win_idx[i] + j] += (longint'(win_b[i][j]) * ai) >>> 12;
      end
    end
    ghr[0] = s18(ghr[0] >>> 3); ghi[0] = s18(ghi[0] >>> 3);
    for (int l = 1; l < 3; l++) begin ghr[l] = s18(ghr[l]); ghi[l] = s18(ghi[l]); end
    for (int m = 0; m < Q; m++) begin gqr[m] = s18(gqr[m]); gqi[m] = s18(gqi[m]); end
  endtask

  task automatic compare();
    longint er, ei, dr, di;
    er = e.re; ei = e.im;
    for (int k = 0; k < M; k++) begin
      checks++;
      if (w[k].re != 18'(c(wr[k])) || w[k].im != 18'(c(wi[k]))) begin
        failures++;
        if (failures < 5) $display("w[%0d] mismatch", k);
      end
    end
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (h[l].re != 18'(c(hr[l])) || h[l].im != 18'(c(hi[l]))) begin
        failures++;
        if (failures < 5) $display("h[%0d] mismatch", l);
      end
    end
    for (int m = 0; m < Q; m++) begin
      dr = s32(((er * gqr[m] - ei * gqi[m]) <<< 4) >>> mu_q);
      di = s32(((er * gqi[m] + ei * gqr[m]) <<< 4) >>> mu_q);
      checks++;
      if (dq[m].re != 32'(dr) || dq[m].im != 32'(di)) begin
        failures++;
        if (failures < 5) $display("dq[%0d] mismatch", m);
      end
    end
  endtask

  task automatic model_update();
    longint er, ei, sr, si;
    er = e.re; ei = e.im;
    for (int k = 0; k < M; k++) begin
      sr = s_line[k+EXTRA].re; si = s_line[k+EXTRA].im;
      wr[k] = s32(wr[k] + (((er * sr + ei * si) <<< 4) >>> mu_w));
      wi[k] = s32(wi[k] + (((ei * sr - er * si) <<< 4) >>> mu_w));
    end
    for (int l = 0; l < 3; l++) begin
      hr[l] = s32(hr[l] + (((er * ghr[l] - ei * ghi[l]) <<< 4) >>> mu_h));
      hi[l] = s32(hi[l] + (((er * ghi[l] + ei * ghr[l]) <<< 4) >>> mu_h));
    end
  endtask

  task automatic randomize_inputs(input int amp);
    e.re = 16'($signed($urandom_range(0, 2 * amp)) - amp);
    e.im = 16'($signed($urandom_range(0, 2 * amp)) - amp);
    foreach (s_line[k]) begin
      s_line[k].re = 18'($signed($urandom_range(0, 16000)) - 8000);
      s_line[k].im = 18'($signed($urandom_range(0, 16000)) - 8000);
    end
    for (int i = 0; i < TAU; i++) begin
      win_x[i].re = 16'($signed($urandom_range(0, 12000)) - 6000);
      win_x[i].im = 16'($signed($urandom_range(0, 12000)) - 6000);
      win_p[i].re = 18'($signed($urandom_range(0, 40000)) - 20000);
      win_p[i].im = 18'($signed($urandom_range(0, 40000)) - 20000);
      win_idx[i] = 3'($urandom_range(0, K - 1));
      win_b[i][2] = 13'($urandom_range(0, 2048));
      win_b[i][0] = 13'($urandom_range(0, 2048));
      win_b[i][1] = 13'(4096 - win_b[i][0] - win_b[i][2]);
    end
  endtask

  initial begin
    for (int k = 0; k < M; k++) begin wr[k] = 0; wi[k] = 0; end
    for (int l = 0; l < 3; l++) begin hr[l] = 0; hi[l] = 0; end
    mu_w = 5'd4; mu_q = 5'd4; mu_h = 5'd4;
    randomize_inputs(4000);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      randomize_inputs((n < 1500) ? 4000 : 30000);
      mu_w = 5'($urandom_range(0, 10));
      mu_q = 5'($urandom_range(0, 10));
      mu_h = 5'($urandom_range(0, 10));
      upd = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 199) == 0);
      #1;
      model_grad();
      compare();
      @(posedge clk);
      if (clear) begin
        for (int k = 0; k < M; k++) begin wr[k] = 0; wi[k] = 0; end
        for (int l = 0; l < 3; l++) begin hr[l] = 0; hi[l] = 0; end
      end else if (upd) model_update();
      #1;
    end
    upd = 0; clear = 0;
    #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
