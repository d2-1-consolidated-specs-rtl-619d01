// tb_shake_axi: drives the SHAKE accelerator through its AXI4 slave port like
// a CPU driver would and compares the output bytes with FIPS 202 reference
// digests (SHAKE-128/256 of the empty message, of "abc", of 200-byte messages
// read out to 200 bytes so that both absorbing and squeezing cross a rate
// boundary, and of 167/135-byte messages whose padding falls into the last
// rate byte), and a 10 KB message in both modes (the smallest message size of
// the accelerator's evaluation), counting its permutations: one per full rate
// block plus the padded one. The long messages are bytes (7*i+3) mod 256.
// Also checks that the padded block is permuted in 24 cycles (the first read
// of DOUT, issued a few cycles after the FINAL write completes, waits 20..28
// cycles) and that STATUS reports the mode and squeezing state.
module tb_shake_axi;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n;
  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata, perm_count;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;

  shake_axi dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .perm_count);

  task automatic axi_write(logic [7:0] a, logic [31:0] d, logic [3:0] s);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1; wvalid = 1;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    bready = 1;
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axi_read(logic [7:0] a, output logic [31:0] d, output int wait_cycles);
    @(negedge clk);
    araddr = a; arvalid = 1;
    wait_cycles = 0;
    #1;
    while (!arready) begin @(negedge clk); #1; wait_cycles++; end
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    rready = 1;
    @(negedge clk);
    rready = 0;
  endtask

  function automatic logic [7:0] hexbyte(string h, int i);
    logic [7:0] v = 0;
    for (int k = 0; k < 2; k++) begin
      byte c = h[2*i + k];
      v = v << 4;
      if (c >= "0" && c <= "9") v = v | 8'(c - "0");
      else v = v | 8'(c - "a" + 10);
    end
    return v;
  endfunction

  function automatic logic [7:0] msg_byte(int kind, int i);
    if (kind == 1) return (i == 0) ? "a" : (i == 1) ? "b" : "c";
    return 8'((7 * i + 3) % 256);
  endfunction

  // kind 0: empty, 1: "abc", 2: (7i+3) pattern
  task automatic run(bit mode256, int kind, int len, int outlen, string expect_hex);
    logic [31:0] w, st;
    int waitc, n;
    axi_write(8'h00, {30'b0, mode256, 1'b1}, 4'hF);
    for (int i = 0; i < len; i += 4) begin
      n = (len - i >= 4) ? 4 : len - i;
      w = 0;
      for (int b = 0; b < n; b++) w[8*b +: 8] = msg_byte(kind, i + b);
      axi_write(8'h08, w, (n == 4) ? 4'hF : (n == 3) ? 4'h7 : (n == 2) ? 4'h3 : 4'h1);
    end
    axi_write(8'h00, 32'h4, 4'hF);
    for (int i = 0; i < outlen; i += 4) begin
      axi_read(8'h0C, w, waitc);
      if (i == 0) begin
        checks++;
        if (waitc < 20 || waitc > 28) begin
          failures++;
          $display("FAIL first DOUT read waited %0d cycles", waitc);
        end
      end
      for (int b = 0; b < 4 && i + b < outlen; b++) begin
        checks++;
        if (w[8*b +: 8] !== hexbyte(expect_hex, i + b)) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode256=%0d len=%0d byte %0d: got %h exp %h", mode256, len, i + b,
                     w[8*b +: 8], hexbyte(expect_hex, i + b));
        end
      end
    end
    axi_read(8'h04, st, waitc);
    checks++;
    if (st[2] !== mode256 || st[0] !== 1'b0) begin
      failures++;
      $display("FAIL STATUS %h", st);
    end
  endtask

  initial begin
    int p0;
    rst_n = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 0, 0, 16, "7f9c2ba4e88f827d616045507605853e");
    run(1, 0, 0, 16, "46b9dd2b0ba88d13233b3feb743eeb24");
    run(0, 1, 3, 32, "5881092dd818bf5cf8a3ddb793fbcba74097d5c526a6d35f97b83351940f2cc8");
    p0 = int'(perm_count);
    run(0, 2, 200, 200, {"243a1de243bd9dce318a217d75b1b026985c06b5de480fc6236143b663f7fe2c",
      "e7e2f263c0b48a559e2500fba0fdc1ede9672bcc20a59771142bab360420c3a98bdfc1161a7d3a68b18c",
      "80025180c5c80c357977cd0b0da656a04d3e12ef4e5ca8b0c6a3731eecfadbf38e41de588e52b0f95614",
      "0b159345a11a711ab04101fa31428825d95b3026a949462953ef8bd80415e4ef6bc87372b9008865a209",
      "b4e6a3770cae7d475eb8ca3197b292f47cad2c378af9b209df0ec4b304044e23b028b58cb43fc02bdfaa"});
    // 200-byte message: one full block + padded block, 200 output bytes: 2 squeeze blocks
    checks++;
    if (int'(perm_count) - p0 != 3) begin
      failures++;
      $display("FAIL %0d permutations for SHAKE-128 200/200, expected 3", int'(perm_count) - p0);
    end
    run(1, 2, 200, 200, {"cd24482e6e8eca556bce1cad6dfec6f4b53bac32f6a0eb0a99aaaf25018db3c1",
      "593cc1304b2e7b9075f18a93638530f3dfd52424a982cfa081bf49580bda2bd0c605587fe905ce7c5881",
      "f4c8a963b5a8cebf47019bbb11050a2a933362ecf89eacceb58558609ccedd4fdda77835e82d6f6190de",
      "411e5ac9f246a1ca4d3f68d1654473c2f86a382373fcf62ad7f5a6d9df284c9976cdffeffdcf875e9c39",
      "ea799054c6ae4c6e82d09502e15ad206c6c568bc09f812e117514a7c2fdaa73063ebf12ec62efb2fdb3e"});
    run(0, 2, 167, 16, "bb961bb015521037905f9baf69ce60dd");
    run(1, 2, 135, 16, "0213fc98352f009fafdf8ee1ea363914");
    // 10 KB: SHAKE-128 absorbs 60 full 168-byte blocks + the padded one
    p0 = int'(perm_count);
    run(0, 2, 10240, 32, "d5a4661a8d1c7fea5d5da5ca976cf114e821b486eacb8b8c87e542d50fcc404c");
    checks++;
    if (int'(perm_count) - p0 != 61) begin
      failures++;
      $display("FAIL %0d permutations for SHAKE-128 of 10 KB, expected 61", int'(perm_count) - p0);
    end
    // SHAKE-256 absorbs 75 full 136-byte blocks + the padded one
    p0 = int'(perm_count);
    run(1, 2, 10240, 64, {"e979e1395889c20d09467246610f8296f6b9900326fefe55d045c24e373537de",
      "592c97e64e9dcb0850f74bc76123190505b1b7869159b64f48b2a4a5e0e3ce8c"});
    checks++;
    if (int'(perm_count) - p0 != 76) begin
      failures++;
      $display("FAIL %0d permutations for SHAKE-256 of 10 KB, expected 76", int'(perm_count) - p0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
