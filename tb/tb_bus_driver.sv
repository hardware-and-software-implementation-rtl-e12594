// tb_bus_driver: checks the tri-state bus port against a second driver.
//
// Two bus_driver instances share one 16-bit bus, as the FPGA and CPLD sides
// do. With only side A enabled, both sides must read A's data; with only B
// enabled, both must read B's. The enables never overlap.
module tb_bus_driver;

  wire  [15:0] bus;
  logic        en_a, en_b;
  logic [15:0] to_a, to_b, from_a, from_b;
  int          checks = 0, failures = 0;

  bus_driver #(.WIDTH(16)) dut_a (.en_write_to_bus(en_a), .data_bus(bus), .data_to_bus(to_a), .data_from_bus(from_a));
  bus_driver #(.WIDTH(16)) dut_b (.en_write_to_bus(en_b), .data_bus(bus), .data_to_bus(to_b), .data_from_bus(from_b));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 0; en_b = 0; to_a = '0; to_b = '0;
    for (int i = 0; i < 200; i++) begin
      to_a = 16'($urandom); to_b = 16'($urandom);
      if (i % 2 == 0) begin en_b = 0; en_a = 1; end
      else            begin en_a = 0; en_b = 1; end
      #5;
      checks++;
      if (en_a && (from_a !== to_a || from_b !== to_a)) begin
        failures++; $display("FAIL: A drives %h, A reads %h, B reads %h", to_a, from_a, from_b);
      end
      if (en_b && (from_a !== to_b || from_b !== to_b)) begin
        failures++; $display("FAIL: B drives %h, A reads %h, B reads %h", to_b, from_a, from_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
