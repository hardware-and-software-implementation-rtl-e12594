// tb_fab_regfile: checks the register file against a reference model.
//
// The model is an array of ten words with the reset values of the register
// table, updated by the same random write sequence with the access rules
// (read-only 0x01-0x03, 14-bit value registers, ignored unused addresses).
// Every read is compared with the model; read data must appear one cycle
// after the strobe and stay unchanged until the next read. Reset restores the
// reset values.
module tb_fab_regfile;
  import fab_pkg::*;

  logic    clk = 1'b0, rst, rnw, strobe;
  adr_t    adr;
  word_t   wdata, rdata;
  ctrl_t   ctrl;
  sample_t dac1, dac2, adc1, adc2;
  word_t   adc1_div, adc2_div, dac1_div, dac2_div;
  stat_t   stat;
  int      checks = 0, failures = 0;
  word_t   model [0:9];

  fab_regfile dut (
    .clk_i(clk), .rst_i(rst), .rnw_i(rnw), .strobe_i(strobe), .adr_i(adr),
    .data_from_bus(wdata), .data_to_bus(rdata), .ctrl_o(ctrl),
    .dac1_val_o(dac1), .dac2_val_o(dac2), .adc1_div_o(adc1_div), .adc2_div_o(adc2_div),
    .dac1_div_o(dac1_div), .dac2_div_o(dac2_div), .stat_i(stat),
    .adc1_val_i(adc1), .adc2_val_i(adc2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void model_reset();
    model[0] = 16'h4400; model[4] = 16'h0000; model[5] = 16'h0000;
    model[6] = 16'h0002; model[7] = 16'h0002; model[8] = 16'h0001; model[9] = 16'h0001;
  endfunction

  function automatic word_t model_read(input int a);
    case (a)
      1: return {12'h000, stat.otr2, stat.otr1, 2'b00};
      2: return {2'b00, adc1};
      3: return {2'b00, adc2};
      0, 4, 5, 6, 7, 8, 9: return model[a];
      default: return 16'h0000;
    endcase
  endfunction

  task automatic bus_write(input int a, input word_t v);
    @(negedge clk); adr = adr_t'(a); wdata = v; rnw = 0; strobe = 1;
    @(negedge clk); strobe = 0; wdata = 16'($urandom);
    case (a)
      0, 6, 7, 8, 9: model[a] = v;
      4, 5:          model[a] = {2'b00, v[13:0]};
      default: ;
    endcase
  endtask

  task automatic bus_read(input int a);
    word_t exp;
    @(negedge clk); adr = adr_t'(a); rnw = 1; strobe = 1;
    exp = model_read(a);
    @(negedge clk); strobe = 0;
    check(rdata == exp, $sformatf("read 0x%02h got %h expected %h", a, rdata, exp));
    // the value must hold while no read is strobed, even if the address moves
    adr = adr_t'($urandom);
    @(negedge clk);
    check(rdata == exp, $sformatf("read data held for 0x%02h", a));
  endtask

  initial begin
    rst = 1; rnw = 1; strobe = 0; adr = '0; wdata = '0;
    adc1 = 14'h1234; adc2 = 14'h3ABC; stat = '0; stat.otr1 = 1'b1;
    model_reset();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // defaults and direct outputs
    check(ctrl == ctrl_t'(16'h4400), "CTRL default 0x4400");
    check(ctrl.sw1 == SW_SIGNAL && ctrl.sw2 == SW_SIGNAL, "switches default to signal");
    check(adc1_div == 16'd2 && adc2_div == 16'd2, "ADC clock dividers default 2");
    check(dac1_div == 16'd1 && dac2_div == 16'd1, "DAC clock dividers default 1");
    check(dac1 == '0 && dac2 == '0, "DAC values default 0");
    for (int a = 0; a < 12; a++) bus_read(a);
    // directed: each value register reaches its own output
    bus_write(4, 16'h0123); bus_write(5, 16'h2ABC);
    check(dac1 == 14'h0123 && dac2 == 14'h2ABC, "DAC1/DAC2 value outputs separate");
    bus_read(4); bus_read(5);
    bus_write(6, 16'h0007); bus_write(7, 16'h0009); bus_write(8, 16'h000B); bus_write(9, 16'h000D);
    check(adc1_div == 7 && adc2_div == 9 && dac1_div == 11 && dac2_div == 13, "divider outputs separate");
    // random accesses
    for (int i = 0; i < 400; i++) begin
      int a;
      a = $urandom_range(0, 13);
      if (i % 37 == 0) begin adc1 = 14'($urandom); adc2 = 14'($urandom); stat.otr2 = 1'($urandom); end
      if ($urandom_range(0, 1)) bus_write(a, 16'($urandom));
      else                      bus_read(a);
    end
    // outputs follow the model
    check(word_t'(ctrl) == model[0], "ctrl output");
    check({2'b00, dac1} == model[4] && {2'b00, dac2} == model[5], "DAC value outputs");
    check(adc1_div == model[6] && adc2_div == model[7] && dac1_div == model[8] && dac2_div == model[9], "divider outputs");
    // reset brings back the defaults
    bus_write(0, 16'hFFFF); bus_write(6, 16'h0055);
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    model_reset();
    for (int a = 0; a < 10; a++) bus_read(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
