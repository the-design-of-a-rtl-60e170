// ft_dual_system: the fault-tolerant dual-processor system.
//
// Two identical Super Sixteen processors, each with its own memory, joined by
// a PIA link: processor 0's PIA side A (pa_out, ca2) drives processor 1's side
// B (pb_in, cb1) and vice versa, so each can send 8-bit messages to the other
// and see its acknowledgement. Neither processor is special in hardware:
// which one is main and which backup, and which is faulty or operational, is
// decided by the software and microcode. In normal running both exchange
// periodic messages to watch each other; when one fails, it runs microcode
// self-tests and reports the results over the link to the operational one,
// which diagnoses the fault and takes over the tasks.
//
// Every per-processor port (loading, ACIA terminal bus, observation) is
// brought out as a two-element array indexed by processor number. Only PIA 0
// of each processor is used for the link; the others are left unconnected
// apart from tie-offs.
module ft_dual_system
  import ss_pkg::*;
#(
  parameter int unsigned N_PIA       = 1,
  parameter int unsigned UCODE_DEPTH = 4096
) (
  input  logic                          clk,
  input  logic [1:0]                    rst_n,
  input  logic [1:0]                    ucode_we,
  input  logic [1:0][11:0]              ucode_addr,
  input  logic [1:0][UWORD_W-1:0]       ucode_data,
  input  logic [1:0]                    map_we,
  input  logic [1:0][7:0]               map_addr,
  input  logic [1:0][7:0]               map_data,
  input  logic [1:0]                    eprom_we,
  input  logic [1:0]                    eprom_hi,
  input  logic [1:0][12:0]              eprom_addr,
  input  logic [1:0][7:0]               eprom_data,
  output logic [1:0]                    acia_cs,
  output logic [1:0]                    acia_we,
  output logic [1:0]                    acia_re,
  output logic [1:0][1:0]               acia_rs,
  output logic [1:0][7:0]               acia_wdata,
  input  logic [1:0][7:0]               acia_rdata,
  output logic [1:0][11:0]              uaddr,
  output logic [1:0]                    int_flag
);
  logic [1:0][N_PIA-1:0][7:0] pa_out;
  logic [1:0][N_PIA-1:0]      ca2, cb2;
  logic [1:0][N_PIA-1:0]      ca1, cb1;
  logic [1:0][N_PIA-1:0][7:0] pb_in;

  for (genvar p = 0; p < 2; p++) begin : g_proc
    // PIA 0 is the link to the other processor; further PIAs are idle.
    for (genvar k = 0; k < N_PIA; k++) begin : g_link
      if (k == 0) begin : g_used
        assign pb_in[p][k] = pa_out[1-p][k];
        assign cb1[p][k]   = ca2[1-p][k];
        assign ca1[p][k]   = cb2[1-p][k];
      end else begin : g_idle
        assign pb_in[p][k] = 8'h00;
        assign cb1[p][k]   = 1'b0;
        assign ca1[p][k]   = 1'b0;
      end
    end

    super_sixteen #(.N_PIA(N_PIA), .UCODE_DEPTH(UCODE_DEPTH)) u_cpu (
      .clk, .rst_n(rst_n[p]),
      .ucode_we(ucode_we[p]), .ucode_addr(ucode_addr[p]), .ucode_data(ucode_data[p]),
      .map_we(map_we[p]), .map_addr(map_addr[p]), .map_data(map_data[p]),
      .eprom_we(eprom_we[p]), .eprom_hi(eprom_hi[p]), .eprom_addr(eprom_addr[p]),
      .eprom_data(eprom_data[p]),
      .acia_cs(acia_cs[p]), .acia_we(acia_we[p]), .acia_re(acia_re[p]),
      .acia_rs(acia_rs[p]), .acia_wdata(acia_wdata[p]), .acia_rdata(acia_rdata[p]),
      .pia_pa_out(pa_out[p]), .pia_ca2(ca2[p]), .pia_ca1(ca1[p]),
      .pia_pb_in(pb_in[p]), .pia_cb1(cb1[p]), .pia_cb2(cb2[p]),
      .uaddr(uaddr[p]), .int_flag(int_flag[p])
    );
  end
endmodule
