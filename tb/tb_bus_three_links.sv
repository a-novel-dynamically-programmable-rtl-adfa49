// tb_bus_three_links: three transmitters and three receivers on one bus, with
// one receiver switched between the transmitters while data flows.
//
// Three bus interfaces T1..T3 each carry one transmitter (fixed codes 1, 2
// and 3) and one receiver R1..R3. R1 listens to T1 and R2 to T2 for the
// whole run. R3 is given a new code every two system clocks (two bit
// cycles), cycling T1, T2, T3. Each new program is shifted into the
// configuration chain in the middle of a system clock and committed there,
// so it must take effect at the next reload slot and never split a bit. Each
// system clock all three transmitters send random bits. In every reload slot
// each receiver must deliver the bit its transmitter sent in the previous
// system clock, with VALID high. The test also requires R3 to have received
// from each of the three transmitters. This is the bus situation used to
// demonstrate the interface in the original architecture. The code values
// and the run length are this testbench's own.
//
// Chain order: cfg_sdi -> R3 -> R2 -> R1 -> end; a program word is shifted in
// least significant bit first and bit j of receiver k is shift number 7k+j.
module tb_bus_three_links;
  localparam int NT = 3;
  localparam int NSYS = 240;   // system clocks simulated

  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] slot;
  logic [3:0] bit_idx;
  logic reload, step, last, word_tick;
  logic cfg_shift = 1'b0, cfg_commit = 1'b0, cfg_sdi = 1'b0;
  logic [NT:0] chain;
  logic [NT-1:0] chips;
  logic signed [2:0] bus;
  logic [NT-1:0] tx_data = '0;
  logic [NT-1:0] rd, rv;
  int checks = 0, failures = 0;

  dpaa_timing u_t (.clk, .rst_n, .slot, .bit_idx, .reload, .step, .last, .word_tick);
  ma_bus #(.N(NT), .BUS_W(3)) u_bus (.chips, .bus);

  assign chain[NT] = cfg_sdi;
  for (genvar i = 0; i < NT; i++) begin : g_if
    bus_interface #(.HAS_TX(1'b1), .N_RX(1), .TX_CODE(7'(i + 1)), .BUS_W(3)) u_if (
      .clk, .rst_n, .reload, .step, .last, .tx_data(tx_data[i]), .tx_chip(chips[i]), .bus,
      .cfg_shift, .cfg_commit, .cfg_sdi(chain[i+1]), .cfg_sdo(chain[i]),
      .rx_data(rd[i:i]), .rx_valid(rv[i:i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((NSYS + 8) * 128) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the bus is the sum of three +-1 chips
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (!(bus == 3 || bus == 1 || bus == -1 || bus == -3)) failures++;
  end

  logic [6:0] prog [NT];   // codes in effect for the current system clock

  task automatic shift_program(input logic [6:0] p0, input logic [6:0] p1, input logic [6:0] p2);
    logic [3*7-1:0] v;
    v = {p2, p1, p0};
    for (int k = 0; k < 3 * 7; k++) begin
      @(negedge clk) begin cfg_sdi = v[k]; cfg_shift = 1'b1; end
    end
    @(negedge clk) begin cfg_shift = 1'b0; cfg_commit = 1'b1; end
    @(negedge clk) cfg_commit = 1'b0;
  endtask

  initial begin
    logic [NT-1:0] sent;                  // bits sent in the previous system clock
    logic [6:0] r3_code, r3_prev;
    int from_tx [NT];
    int n_switch = 0;
    for (int i = 0; i < NT; i++) from_tx[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    r3_code = 7'd1;
    shift_program(7'd1, 7'd2, r3_code);
    @(negedge clk iff reload);
    for (int i = 0; i < NT; i++) prog[i] = 7'd0;
    sent = '0;
    for (int s = 0; s < NSYS; s++) begin
      // decisions on the previous system clock, under the codes in effect then
      if (s > 0) begin
        for (int i = 0; i < NT; i++) begin
          checks += 2;
          if (prog[i] == 7'd0) begin
            if (rv[i] || rd[i]) failures++;
          end else begin
            if (!rv[i]) failures++;
            if (rd[i] != sent[int'(prog[i]) - 1]) failures++;
          end
        end
        if (prog[2] != 7'd0 && rv[2]) from_tx[int'(prog[2]) - 1]++;
      end
      // the codes committed before this reload apply from now on
      prog[0] = 7'd1;
      prog[1] = 7'd2;
      r3_prev = prog[2];
      prog[2] = r3_code;
      if (s > 0 && prog[2] != r3_prev) n_switch++;
      tx_data = 3'($urandom);
      sent = tx_data;
      // every second system clock: move R3 to the next transmitter mid-clock
      if (s % 2 == 1) begin
        @(negedge clk iff (slot == 7'd40));
        r3_code = (r3_code == 7'd3) ? 7'd1 : r3_code + 7'd1;
        shift_program(7'd1, 7'd2, r3_code);
      end
      @(negedge clk iff reload);
    end
    for (int i = 0; i < NT; i++) begin
      checks++;
      if (from_tx[i] == 0) failures++;
      $display("R3 received %0d bits from T%0d", from_tx[i], i + 1);
    end
    checks++;
    if (n_switch < NSYS / 2 - 2) failures++;
    $display("R3 switched %0d times", n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
