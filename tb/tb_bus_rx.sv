// tb_bus_rx: self-checking testbench of the receiver.
//
// Each system clock a random number (1 to 54) of transmitters with distinct
// random codes and random data bits is modelled here; their chips are summed
// into the bus value fed to the receiver. The receiver's code is set to one
// of the transmitters (it must deliver that transmitter's bit with VALID
// high), to a code no transmitter uses or to code 0 (VALID low, data 0).
// The decision must be there in the reload slot after the 127 chip slots.
module tb_bus_rx;
  import pn_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, step = 1'b0, last = 1'b0;
  logic [6:0] code = '0;
  logic signed [6:0] bus = '0;
  logic data, valid;
  int checks = 0, failures = 0;
  int n_match = 0, n_nomatch = 0;

  bus_rx #(.BUS_W(7)) dut (.clk, .rst_n, .load, .step, .last, .code, .bus, .data, .valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600 * 128 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_seq_t seq [54];
    logic [6:0] codes [54];
    bit d [54];
    int k, sel, mode, sum;
    bit exp_d, exp_v;
    bit used [128];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      k = (c < 20) ? 54 : $urandom_range(1, 54);
      foreach (used[i]) used[i] = 0;
      for (int i = 0; i < k; i++) begin
        do codes[i] = 7'($urandom_range(1, 127)); while (used[codes[i]]);
        used[codes[i]] = 1;
        seq[i] = pn_seq(codes[i]);
        d[i] = 1'($urandom);
      end
      mode = $urandom_range(0, 3);
      sel  = $urandom_range(0, k - 1);
      if (mode == 0 && k < 127) begin        // unused code
        do code = 7'($urandom_range(1, 127)); while (used[code]);
        exp_v = 0; exp_d = 0;
      end else if (mode == 1) begin          // disconnected
        code = 7'd0; exp_v = 0; exp_d = 0;
      end else begin                         // matched
        code = codes[sel]; exp_v = 1; exp_d = d[sel];
      end
      @(negedge clk) begin load = 1'b1; step = 1'b0; last = 1'b0; end
      for (int t = 0; t < 127; t++) begin
        sum = 0;
        for (int i = 0; i < k; i++) sum += (d[i] ^ seq[i][t]) ? -1 : 1;
        @(negedge clk) begin load = 1'b0; step = 1'b1; last = (t == 126); bus = 7'(sum); end
      end
      @(negedge clk) begin step = 1'b0; last = 1'b0; end
      checks += 2;
      if (valid != exp_v || data != exp_d) begin
        failures++;
        if (failures < 10) $display("cycle %0d k=%0d mode=%0d: data %b valid %b expected %b %b", c, k, mode, data, valid, exp_d, exp_v);
      end
      if (exp_v) n_match++; else n_nomatch++;
    end
    $display("matched %0d, unmatched %0d", n_match, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
