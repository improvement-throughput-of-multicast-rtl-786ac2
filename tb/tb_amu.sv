// tb_amu: checks the address modifier unit with random flits and partitions.
// A header's destination bit string must come out ANDed with the partition
// string; body, tail and idle flits must pass untouched.
module tb_amu;
  import noc_pkg::*;

  logic              clk = 1'b0;
  flit_t             fin, fout;
  logic [ADDR_W-1:0] part;
  int                checks = 0, failures = 0;

  amu dut (.flit_in(fin), .partition(part), .flit_out(fout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] exp_data;
    for (int i = 0; i < 400; i++) begin
      fin.kind = flit_kind_e'(i % 4);
      fin.data = {$urandom, $urandom};
      part     = {$urandom, $urandom};
      @(posedge clk);
      exp_data = fin.data;
      if (fin.kind == FLIT_HEAD)
        for (int b = 0; b < int'(ADDR_W); b++) exp_data[b] = fin.data[b] & part[b];
      checks++;
      if (fout.kind != fin.kind || fout.data != exp_data) begin
        failures++;
        $display("mismatch kind=%0d in=%h part=%h out=%h", fin.kind, fin.data, part, fout.data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
