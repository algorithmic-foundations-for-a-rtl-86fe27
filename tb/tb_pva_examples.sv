// tb_pva_examples: the worked examples of the PVA algorithm, run through the
// whole subsystem at the memory sizes they are stated for. For each vector the
// bank that returns every element is compared with the bank sequence the
// example lists, and the data with memory.
//   8 banks x 4-word blocks: <0,8,16> hits banks 0,2,4,6,0,2,...;
//     <0,9,4> hits 0,2,4,6; <0,9,10> moves from 0,2,4,6 to 1,3,5,7.
//   2 banks x 8-word blocks (the physical/logical view pictures): words 0-7
//     and 16-23 in bank 0, 8-15 and 24-31 in bank 1; <0,3,16> checked.
//   16 word-interleaved banks: stride 10 from bank 2 hits 2,12,6,0,10,4,14,8,2.
//   8 banks x 16-word blocks (default): line fill <0,1,16> all in bank 0;
//     strided <0,16,16> one element per bank, twice round the 8 banks.
module tb_pva_examples;
  import pva_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pva_example_env #(.M(8),  .N(4))  e84  (.clk, .rst_n);
  pva_example_env #(.M(2),  .N(8))  e28  (.clk, .rst_n);
  pva_example_env #(.M(16), .N(1))  e161 (.clk, .rst_n);
  pva_example_env #(.M(8),  .N(16)) e816 (.clk, .rst_n);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic compare(string name, int got [LMAX], int want [$], bit data_ok, int lat);
    string s = "";
    bit ok = data_ok;
    foreach (want[k]) begin
      if (got[k] != want[k]) ok = 1'b0;
      s = {s, $sformatf(" %0d", got[k])};
    end
    $display("%s: banks%s, %0d cycles", name, s, lat);
    check(ok, name);
  endtask

  initial begin
    int banks [LMAX];
    bit ok;
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    e84.gather(0, 8, 16, banks, ok, lat);
    compare("M=8 N=4 <0,8,16>", banks, '{0,2,4,6,0,2,4,6,0,2,4,6,0,2,4,6}, ok, lat);
    e84.gather(0, 9, 4, banks, ok, lat);
    compare("M=8 N=4 <0,9,4>", banks, '{0,2,4,6}, ok, lat);
    e84.gather(0, 9, 10, banks, ok, lat);
    compare("M=8 N=4 <0,9,10>", banks, '{0,2,4,6,1,3,5,7,2,4}, ok, lat);
    e28.gather(0, 3, 16, banks, ok, lat);
    compare("M=2 N=8 <0,3,16>", banks, '{0,0,0,1,1,1,0,0,1,1,1,0,0,0,1,1}, ok, lat);
    e28.gather(4, 1, 16, banks, ok, lat);
    compare("M=2 N=8 <4,1,16>", banks, '{0,0,0,0,1,1,1,1,1,1,1,1,0,0,0,0}, ok, lat);
    e161.gather(2, 10, 9, banks, ok, lat);
    compare("M=16 N=1 <2,10,9>", banks, '{2,12,6,0,10,4,14,8,2}, ok, lat);
    e816.gather(0, 1, 16, banks, ok, lat);
    compare("M=8 N=16 line fill <0,1,16>", banks, '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}, ok, lat);
    check(lat <= 30, "line fill latency");
    e816.gather(0, 16, 16, banks, ok, lat);
    compare("M=8 N=16 <0,16,16>", banks, '{0,1,2,3,4,5,6,7,0,1,2,3,4,5,6,7}, ok, lat);
    check(e84.total_violations() == 0 && e28.total_violations() == 0 &&
          e161.total_violations() == 0 && e816.total_violations() == 0, "SDRAM protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
