// tb_pt_pkg: the page table the testbenches translate against.
//
// A translation is a pure function of (task, VPN): the task number sits in
// the top 4 bits of the PPN, so pages of different tasks never share a
// frame, and the low bits are a multiplicative hash of the VPN and task.
// The attributes are the low 4 bits of VPN xor task.
package tb_pt_pkg;

  function automatic logic [31:0] pt_ppn(input int unsigned task_id, input logic [31:0] vpn,
                                         input int unsigned ppn_w);
    logic [31:0] h;
    logic [31:0] low_mask;
    h        = (vpn * 32'h9E37_79B1) ^ (task_id * 32'h0100_0193) ^ (h_shift(vpn));
    low_mask = (32'd1 << (ppn_w - 4)) - 1;
    return ((32'(task_id) & 32'hF) << (ppn_w - 4)) | (h & low_mask);
  endfunction

  function automatic logic [31:0] h_shift(input logic [31:0] v);
    return {v[15:0], v[31:16]} >> 3;
  endfunction

  function automatic logic [3:0] pt_attr(input int unsigned task_id, input logic [31:0] vpn);
    return 4'(vpn ^ 32'(task_id));
  endfunction

endpackage
