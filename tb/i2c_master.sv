`timescale 1ps/1fs
// Bit-banged I2C master for testbenches (SCL period 2.5 us, 400 kHz).
// SDA is open drain: the line is low when the master or the slave pulls.
module i2c_master (
  output logic scl,
  output logic sda,      // resolved line level
  input  logic slave_oe  // slave pulls low
);
  localparam realtime Q = 625000.0;   // quarter SCL period
  logic m_sda = 1;
  assign sda = m_sda & ~slave_oe;
  initial scl = 1;

  task automatic start_c();
    m_sda = 1; scl = 1; #(Q);
    m_sda = 0; #(Q);
    scl = 0; #(Q);
  endtask

  task automatic stop_c();
    m_sda = 0; #(Q);
    scl = 1; #(Q);
    m_sda = 1; #(2 * Q);
  endtask

  task automatic send_bit(input logic b);
    m_sda = b; #(Q);
    scl = 1; #(2 * Q);
    scl = 0; #(Q);
  endtask

  task automatic recv_bit(output logic b);
    m_sda = 1; #(Q);
    scl = 1; #(Q);
    b = sda; #(Q);
    scl = 0; #(Q);
  endtask

  task automatic write_byte(input logic [7:0] d, output logic ack);
    logic a;
    for (int i = 7; i >= 0; i--) send_bit(d[i]);
    recv_bit(a);
    ack = !a;
  endtask

  task automatic read_byte(output logic [7:0] d, input logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) begin recv_bit(b); d[i] = b; end
    send_bit(!ack);
  endtask
endmodule
