// tb_crypto_top: end-to-end test of the stream-cipher datapath at its
// default parameters (reseeding period 1021). A message of random words is
// sent with random gaps; every cipher word must equal plain ^ key, with the
// key stream taken from a software model of the RM-PRNG, one cycle after
// acceptance, and every decrypted word must equal the plain word two cycles
// after acceptance. The generator is then restarted with the same seeds and
// must reproduce the same cipher text, and once with seed1 = 0, a fixed
// point of the map. Counted mechanisms, each of which must occur: words
// encrypted and decrypted, stall cycles, fixed-point reseeds, period
// reseeds, restarts that reproduce the stream.
module tb_crypto_top;
  import tb_ref_pkg::*;
  import rm_prng_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, pt_valid = 0;
  logic [31:0] seed1 = '0, pt_data = '0;
  logic [30:0] seed2 = '0;
  logic        pt_ready, ct_valid, dec_valid, reseed_fixed, reseed_period;
  logic [31:0] ct_data, dec_data, key;
  rm_prng_ref  mdl;

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_stall = 0, n_fixed = 0, n_period = 0, n_repeat = 0;

  // expected outputs, indexed by the cycle they should appear in
  logic [31:0] exp_ct [$];
  logic [31:0] exp_pt [$];
  logic [31:0] first_ct [$];

  crypto_top dut (
    .clk, .rst_n, .start, .seed1, .seed2,
    .pt_valid, .pt_ready, .pt_data,
    .ct_valid, .ct_data, .dec_valid, .dec_data,
    .key, .reseed_fixed, .reseed_period
  );

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker: ct appears the cycle after acceptance, dec the cycle after that.
  logic        acc_d1, acc_d2;
  logic [31:0] ct_d1, pt_d1, pt_d2;
  always @(posedge clk) begin
    if (!rst_n) begin
      acc_d1 <= 0; acc_d2 <= 0;
    end else begin
      #1;
      checks += 2;
      if (ct_valid !== acc_d1)  begin failures++; $display("FAIL ct_valid timing"); end
      if (dec_valid !== acc_d2) begin failures++; $display("FAIL dec_valid timing"); end
      if (acc_d1) begin
        checks++; n_enc++;
        if (ct_data !== ct_d1) begin failures++; $display("FAIL ct %h exp %h", ct_data, ct_d1); end
      end
      if (acc_d2) begin
        checks++; n_dec++;
        if (dec_data !== pt_d2) begin failures++; $display("FAIL dec %h exp %h", dec_data, pt_d2); end
      end
    end
  end

  // one message: n words, stall_pct percent idle cycles; optionally record
  // or compare the cipher text
  task automatic message(input logic [31:0] s1, input logic [30:0] s2, input int n,
                         input int stall_pct, input int mode);
    int sent = 0;
    @(negedge clk); start = 1; seed1 = s1; seed2 = s2;
    @(negedge clk); start = 0;
    mdl.start(s1, s2);
    while (sent < n) begin
      bit ef, ep, acc;
      logic [31:0] w, ek;
      w        = $urandom;
      pt_valid = ($urandom_range(99, 0) >= stall_pct);
      pt_data  = w;
      #1;
      acc = pt_valid && pt_ready;
      if (!pt_ready) begin failures++; $display("FAIL not ready"); end
      if (!pt_valid) n_stall++;
      ek = mdl.key();
      if (acc) begin
        checks++;
        if (key !== ek) begin failures++; $display("FAIL key word %0d %h exp %h", sent, key, ek); end
        mdl.step(ef, ep);
        checks++;
        if (reseed_fixed !== ef || reseed_period !== ep) begin failures++; $display("FAIL reseed flags"); end
        if (ef) n_fixed++;
        if (ep) n_period++;
        if (mode == 1) first_ct.push_back(w ^ ek);
        if (mode == 2) begin
          checks++;
          if ((w ^ ek) !== first_ct[sent]) begin failures++; $display("FAIL restart word %0d", sent); end
          else n_repeat++;
        end
        sent++;
      end
      @(posedge clk);
      acc_d2 <= acc_d1; pt_d2 <= pt_d1;
      acc_d1 <= acc;    pt_d1 <= w;    ct_d1 <= w ^ ek;
      @(negedge clk);
    end
    pt_valid = 0;
    @(posedge clk); acc_d2 <= acc_d1; pt_d2 <= pt_d1; acc_d1 <= 0;
    @(posedge clk); acc_d2 <= acc_d1; pt_d2 <= pt_d1; acc_d1 <= 0;
    @(negedge clk);
  endtask

  initial begin
    mdl = new(RS_TR, RS_R);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    checks++;
    if (pt_ready) begin failures++; $display("FAIL ready before start"); end
    // same plain text stream is random, but the cipher of the key part must repeat:
    // record w ^ key and compare after restart using the same plain words
    begin
      int unsigned s;
      s = 32'hC0FFEE;
      void'($urandom(s));
      message(32'h6A09_E667, 31'h3C6E_F372, 2300, 25, 1);
      void'($urandom(s));
      message(32'h6A09_E667, 31'h3C6E_F372, 2300, 25, 2);
    end
    message(32'h0000_0000, 31'h0BB6_7AE8, 300, 10, 0);
    checks += 6;
    if (n_enc == 0)    begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)    begin failures++; $display("FAIL no decryption"); end
    if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    if (n_fixed == 0)  begin failures++; $display("FAIL no fixed-point reseed"); end
    if (n_period == 0) begin failures++; $display("FAIL no period reseed"); end
    if (n_repeat == 0) begin failures++; $display("FAIL no restart reproduction"); end
    $display("encrypted %0d decrypted %0d stalls %0d fixed %0d period %0d repeated %0d",
             n_enc, n_dec, n_stall, n_fixed, n_period, n_repeat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
