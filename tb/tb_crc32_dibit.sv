// tb_crc32_dibit: checks the dibit CRC register against the byte-reflected
// reference. For random messages: (1) the complemented register, read
// bit 31 first, equals the reference FCS sent low byte first; (2) after the
// FCS itself is absorbed the register holds the 802.3 residue 0xC704DD7B.
// Also the standard check value: CRC-32 of "123456789" = 0xCBF43926.
module tb_crc32_dibit;
  import eth_tb_pkg::*;

  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [1:0] d = 0;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32_dibit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(bq_t b);
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    foreach (b[i])
      for (int k = 0; k < 4; k++) begin
        en = 1; d = b[i][2*k +: 2];
        @(negedge clk);
      end
    en = 0;
  endtask

  function automatic logic [31:0] fcs_wire(logic [31:0] reg_val);
    // bits of ~reg sent 31 first, regrouped as bytes LSB first
    logic [31:0] f, r;
    f = ~reg_val;
    for (int i = 0; i < 32; i++) r[i] = f[31 - i];
    return r;
  endfunction

  initial begin
    bq_t m;
    logic [31:0] ref_fcs;
    @(negedge clk) rst = 0;
    m = {8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    feed(m);
    checks++;
    if (fcs_wire(crc) !== 32'hCBF4_3926) begin
      failures++; $display("check value: got %h", fcs_wire(crc));
    end
    for (int t = 0; t < 40; t++) begin
      m = {};
      for (int i = 0; i < 1 + $urandom_range(0, 80); i++) m.push_back(8'($urandom));
      ref_fcs = crc32_ref(m);
      feed(m);
      checks++;
      if (fcs_wire(crc) !== ref_fcs) begin
        failures++; $display("fcs mismatch %h vs %h", fcs_wire(crc), ref_fcs);
      end
      feed(add_fcs(m));
      checks++;
      if (crc !== 32'hC704_DD7B) begin
        failures++; $display("residue %h", crc);
      end
    end
    // en low holds the register
    begin
      logic [31:0] h;
      h = crc;
      repeat (5) @(negedge clk);
      checks++;
      if (crc !== h) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
