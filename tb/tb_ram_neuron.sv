// tb_ram_neuron: exhaustive test of the default ram_neuron (the published
// class "Four" neuron). The expected truth table is built here from the same
// minterms written out bit by bit (e12 first) and compared with the neuron's
// output for all 4096 addresses.
module tb_ram_neuron;
  localparam int NT = 30;
  // e12 .. e1 of each trained minterm
  localparam string MT [NT] = '{
    "001111111100", "011100011110", "000010000111", "001110011110", "001110011110",
    "001110000100", "001110011100", "001110011100", "001110011100", "001110000100",
    "001110000100", "001110000100", "001110011100", "001110001110", "001110001110",
    "001110001110", "001110001110", "001110001110", "001110001110", "001110001110",
    "001110001110", "001110001110", "001110001100", "001110000100", "001110000110",
    "001110000110", "001110000110", "001110000110", "001110000110", "001110011100"};

  logic [11:0] addr;
  logic        fire;
  bit          table_ref [4096];
  int          checks = 0, failures = 0, ones = 0;

  ram_neuron dut (.addr(addr), .fire(fire));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    foreach (table_ref[i]) table_ref[i] = 1'b0;
    for (int t = 0; t < NT; t++) begin
      a = 0;
      for (int b = 0; b < 12; b++) a = a * 2 + ((MT[t][b] == "1") ? 1 : 0);
      table_ref[a] = 1'b1;
    end
    for (int i = 0; i < 4096; i++) begin
      addr = 12'(i);
      #1;
      checks++;
      if (fire !== table_ref[i]) begin
        failures++;
        if (failures < 10) $display("mismatch addr=%03h fire=%b expected=%b", i, fire, table_ref[i]);
      end
      if (fire) ones++;
    end
    // the class "Four" neuron has 9 distinct trained addresses
    checks++;
    if (ones != 9) begin failures++; $display("fired on %0d addresses, expected 9", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
