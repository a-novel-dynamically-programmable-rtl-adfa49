// tb_setup_cache: self-checking testbench of the setup cache.
//
// Three caches are chained as on the configuration bus. Random codes are
// shifted in least significant bit first; the active codes must not change
// while shifting, must take the new codes on commit, and the bits leaving
// the end of the chain must be the codes shifted in old_code, in order.
module tb_setup_cache;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift = 1'b0, commit = 1'b0, sdi = 1'b0;
  logic [N:0] chain;
  logic [6:0] code [N];
  int checks = 0, failures = 0;

  assign chain[N] = sdi;
  for (genvar i = 0; i < N; i++) begin : g
    setup_cache dut (.clk, .rst_n, .shift, .sdi(chain[i+1]), .sdo(chain[i]), .commit, .code(code[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [7*N-1:0] v, prev;
    logic [6:0] old_code [N];
    logic [7*N-1:0] outbits;
    prev = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < N; i++) check(code[i] == 7'd0, "reset code is 0");
    for (int r = 0; r < 50; r++) begin
      v = {$urandom, $urandom};
      for (int i = 0; i < N; i++) old_code[i] = code[i];
      for (int k = 0; k < 7 * N; k++) begin
        @(negedge clk);
        outbits[k] = chain[0];        // bit leaving the chain this clock
        sdi = v[k]; shift = 1'b1;
        if (k % 5 == 0)
          for (int i = 0; i < N; i++) check(code[i] == old_code[i], "code stable while shifting");
      end
      @(negedge clk) begin shift = 1'b0; end
      check(outbits == prev, $sformatf("chain out %h expected %h", outbits, prev));
      for (int i = 0; i < N; i++) check(code[i] == old_code[i], "no change old_code commit");
      @(negedge clk) commit = 1'b1;
      @(negedge clk) commit = 1'b0;
      for (int i = 0; i < N; i++)
        check(code[i] == v[7*i +: 7], $sformatf("cache %0d code %h expected %h", i, code[i], v[7*i +: 7]));
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
