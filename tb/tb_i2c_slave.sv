// tb_i2c_slave: an I2C master model on an open-drain bus. Writes bytes to
// the slave's address (each must be acknowledged and come out on rx_data),
// addresses another device (must be refused, nothing received), and reads
// bytes back (the slave must send the tx_data bytes it requested, in order,
// until the master answers with NACK).
module tb_i2c_slave;
  localparam int Q = 10;   // clocks per quarter bus period
  logic clk = 0, rst = 1, scl = 1, m_low = 0, sda_oe, rx_valid, tx_req, active;
  logic [7:0] rx_data, tx_data;
  wire sda_i = !(m_low || sda_oe);
  logic [7:0] rxq [$];
  int checks = 0, failures = 0, ntx = 0;

  i2c_slave dut (.clk, .rst, .scl, .sda_i, .sda_oe, .rx_data, .rx_valid, .tx_data, .tx_req, .active);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && rx_valid) rxq.push_back(rx_data);
    if (!rst && tx_req) ntx++;
  end
  assign tx_data = 8'hA0 + 8'(ntx);   // byte n of a read is A0+n
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic wq(int n = 1); repeat (n * Q) @(negedge clk); endtask
  task automatic start_c; m_low = 0; scl = 1; wq(); m_low = 1; wq(); scl = 0; wq(); endtask
  task automatic stop_c; m_low = 1; wq(); scl = 1; wq(); m_low = 0; wq(2); endtask
  task automatic put_bit(logic b); m_low = !b; wq(); scl = 1; wq(2); scl = 0; wq(); endtask
  task automatic get_bit(output logic b); m_low = 0; wq(); scl = 1; wq(); b = sda_i; wq(); scl = 0; wq(); endtask
  task automatic wr_byte(logic [7:0] v, output logic ack);
    logic b;
    for (int k = 7; k >= 0; k--) put_bit(v[k]);
    get_bit(b); ack = !b;
  endtask
  task automatic rd_byte(logic ack, output logic [7:0] v);
    for (int k = 7; k >= 0; k--) get_bit(v[k]);
    put_bit(!ack); m_low = 0;
  endtask

  initial begin
    logic ack; logic [7:0] v, d [3];
    @(posedge clk); @(posedge clk); rst <= 0; wq(2);
    // write three bytes
    start_c(); wr_byte({7'h50, 1'b0}, ack);
    checks++; if (!ack) begin failures++; $display("FAIL addr nack"); end
    for (int i = 0; i < 3; i++) begin
      d[i] = 8'($urandom); wr_byte(d[i], ack);
      checks++; if (!ack) begin failures++; $display("FAIL data nack"); end
    end
    stop_c();
    checks += 4;
    if (rxq.size() != 3) begin failures++; $display("FAIL got %0d bytes", rxq.size()); end
    for (int i = 0; i < 3 && rxq.size() > 0; i++)
      if (rxq.pop_front() !== d[i]) begin failures++; $display("FAIL byte %0d", i); end
    // another device's address
    start_c(); wr_byte({7'h23, 1'b0}, ack);
    checks++; if (ack) begin failures++; $display("FAIL foreign address acked"); end
    wr_byte(8'h55, ack); stop_c();
    checks++; if (rxq.size() != 0) begin failures++; $display("FAIL foreign write received"); end
    // read three bytes
    start_c(); wr_byte({7'h50, 1'b1}, ack);
    checks++; if (!ack) begin failures++; $display("FAIL read addr nack"); end
    for (int i = 0; i < 3; i++) begin
      rd_byte(i < 2, v);
      checks++; if (v !== 8'hA0 + 8'(i)) begin failures++; $display("FAIL read %0d = %h", i, v); end
    end
    stop_c();
    checks++; if (ntx != 3) begin failures++; $display("FAIL tx_req %0d", ntx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
