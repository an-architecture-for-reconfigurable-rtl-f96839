// Self-checking testbench of des_core: known-answer vectors for an
// encryption and a decryption instance, the 17-cycle latency, back-to-back
// blocks with the next input changed during a run, and decrypt(encrypt(x)).
module tb_des_core;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge for the asynchronous resets
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        s_enc, s_dec, b_enc, b_dec, d_enc, d_dec;
  logic [63:0] key, din, o_enc, o_dec;

  des_core #(.DECRYPT(1'b0)) u_enc (.clk, .rst_n, .start(s_enc), .key, .din, .busy(b_enc), .done(d_enc), .dout(o_enc));
  des_core #(.DECRYPT(1'b1)) u_dec (.clk, .rst_n, .start(s_dec), .key, .din, .busy(b_dec), .done(d_dec), .dout(o_dec));

  // key, plaintext, ciphertext (FIPS 46 examples and reference-library vectors)
  localparam logic [63:0] VEC [8][3] = '{
    '{64'h0123456789abcdef, 64'h4e6f772069732074, 64'h3fa40e8a984d4815},
    '{64'h133457799bbcdff1, 64'h0123456789abcdef, 64'h85e813540f0ab405},
    '{64'h91b7584a2265b1f5, 64'hcd613e30d8f16adf, 64'h119710c1ea2d0f9d},
    '{64'h1027c4d1c386bbc4, 64'h1e2feb89414c343c, 64'hc2e76a16e764c54e},
    '{64'hc2ce6f447ed4d57b, 64'h78e510617311d8a3, 64'h611dd5527508e69e},
    '{64'h612e7696a6cecc1b, 64'h35bf992dc9e9c616, 64'h1c576cf5669922f4},
    '{64'h7ce42c8218072e8c, 64'he4b06ce60741c7a8, 64'h60e3db76709910eb},
    '{64'h63ca828dd5f4b3b2, 64'h9b810e766ec9d286, 64'h915fd82fef5a6c9b}
  };

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Start one block on one core and return the number of cycles to 'done'
  task automatic run(bit dec, logic [63:0] k, logic [63:0] d, output logic [63:0] res, output int cyc);
    key = k; din = d;
    if (dec) s_dec = 1'b1; else s_enc = 1'b1;
    @(posedge clk); #1;
    s_enc = 1'b0; s_dec = 1'b0;
    // the next block's inputs may change at once: the core must not care
    key = ~k; din = ~d;
    cyc = 1;
    while (!(dec ? d_dec : d_enc)) begin
      @(posedge clk); #1;
      cyc++;
    end
    res = dec ? o_dec : o_enc;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] res, c2;
    int cyc;
    s_enc = 0; s_dec = 0; key = '0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (VEC[i]) begin
      run(1'b0, VEC[i][0], VEC[i][1], res, cyc);
      check(res == VEC[i][2], $sformatf("encrypt vector %0d: got %h", i, res));
      check(cyc == 17, $sformatf("encrypt latency %0d cycles, expected 17", cyc));
      run(1'b1, VEC[i][0], VEC[i][2], res, cyc);
      check(res == VEC[i][1], $sformatf("decrypt vector %0d: got %h", i, res));
      check(cyc == 17, $sformatf("decrypt latency %0d cycles, expected 17", cyc));
    end
    // start while busy is ignored; output holds between blocks
    key = VEC[0][0]; din = VEC[0][1]; s_enc = 1'b1;
    @(posedge clk); #1;
    din = VEC[1][1];
    repeat (5) @(posedge clk);
    #1 s_enc = 1'b0;
    while (!d_enc) begin @(posedge clk); #1; end
    check(o_enc == VEC[0][2], "start while busy must not disturb the running block");
    repeat (4) @(posedge clk);
    #1 check(o_enc == VEC[0][2] && !b_enc, "output held while idle");
    // random round trips
    for (int n = 0; n < 20; n++) begin
      logic [63:0] k, p;
      k = {$urandom, $urandom}; p = {$urandom, $urandom};
      run(1'b0, k, p, c2, cyc);
      run(1'b1, k, c2, res, cyc);
      check(res == p, $sformatf("round trip %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
