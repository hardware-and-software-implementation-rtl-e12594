// tb_bus_transceiver: checks the bidirectional transceiver model.
//
// A tri-state driver sits on each side. With dir = 0 the board-side driver
// is on and its data must appear on the FPGA side; with dir = 1 the FPGA-side
// driver is on and its data must appear on the board side. A second
// instance with a 3 ns delay must, in both directions, still show the old
// value 2 ns after a change and the new one 4 ns after it.
module tb_bus_transceiver;

  wire  [15:0] side_a, side_b;
  logic        dir, en_a, en_b;
  logic [15:0] to_a, to_b, from_a, from_b;
  int          checks = 0, failures = 0;
  wire  [15:0] dly_a, dly_b;
  logic [15:0] dly_from_b;
  logic        dly_dir;
  logic [15:0] dly_in, dly_in_b, dly_from_a;

  bus_transceiver #(.WIDTH(16)) dut (.a(side_a), .b(side_b), .dir_i(dir));
  bus_driver #(.WIDTH(16)) drv_a (.en_write_to_bus(en_a), .data_bus(side_a), .data_to_bus(to_a), .data_from_bus(from_a));
  bus_driver #(.WIDTH(16)) drv_b (.en_write_to_bus(en_b), .data_bus(side_b), .data_to_bus(to_b), .data_from_bus(from_b));

  bus_transceiver #(.WIDTH(16), .PROP_DELAY(3ns)) dut_dly (.a(dly_a), .b(dly_b), .dir_i(dly_dir));
  bus_driver #(.WIDTH(16)) drv_dly (.en_write_to_bus(dly_dir), .data_bus(dly_a), .data_to_bus(dly_in), .data_from_bus());
  bus_driver #(.WIDTH(16)) drv_dly_b (.en_write_to_bus(!dly_dir), .data_bus(dly_b), .data_to_bus(dly_in_b), .data_from_bus());
  assign dly_from_b = dly_b;
  assign dly_from_a = dly_a;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dir = 0; en_a = 0; en_b = 0; to_a = '0; to_b = '0; dly_dir = 0; dly_in = '0; dly_in_b = '0;
    for (int i = 0; i < 200; i++) begin
      to_a = 16'($urandom); to_b = 16'($urandom);
      // turn the drivers in a safe order
      en_a = 0; en_b = 0; #1;
      dir = (i % 3 == 0);
      #1;
      if (dir) en_a = 1; else en_b = 1;
      #5;
      checks++;
      if (dir && from_b !== to_a) begin
        failures++; $display("FAIL: a->b sent %h got %h", to_a, from_b);
      end
      if (!dir && from_a !== to_b) begin
        failures++; $display("FAIL: b->a sent %h got %h", to_b, from_a);
      end
    end
    // delayed instance, direction a -> b
    dly_dir = 1; dly_in = 16'h0F0F; #10;
    for (int i = 0; i < 50; i++) begin
      logic [15:0] old_v, new_v;
      old_v = dly_in;
      new_v = 16'($urandom) | 16'h0001;
      if (new_v == old_v) new_v = ~old_v;
      dly_in = new_v;
      #2;
      checks++;
      if (dly_from_b !== old_v) begin failures++; $display("FAIL: delayed copy changed early"); end
      #2;
      checks++;
      if (dly_from_b !== new_v) begin failures++; $display("FAIL: delayed copy %h expected %h", dly_from_b, new_v); end
      #6;
    end
    // delayed instance, direction b -> a
    dly_dir = 0; dly_in_b = 16'h3C3C; #10;
    for (int i = 0; i < 50; i++) begin
      logic [15:0] old_v, new_v;
      old_v = dly_in_b;
      new_v = 16'($urandom) | 16'h0001;
      if (new_v == old_v) new_v = ~old_v;
      dly_in_b = new_v;
      #2;
      checks++;
      if (dly_from_a !== old_v) begin failures++; $display("FAIL: delayed copy b->a changed early"); end
      #2;
      checks++;
      if (dly_from_a !== new_v) begin failures++; $display("FAIL: delayed copy b->a %h expected %h", dly_from_a, new_v); end
      #6;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
